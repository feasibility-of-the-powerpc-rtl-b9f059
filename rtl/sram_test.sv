// sram_test: built-in SRAM tester.
//
// Writes a test pattern to every word from address 0 up to WORDS-1, one word
// per clock, then reads the words back one per clock and compares each with
// the pattern (data and its EDAC check bits). When a pass is complete the
// pattern is inverted and the process repeats, PASSES times in all (two
// passes, the pattern and its inverse, by default). errors counts words that
// read back wrong; fail_addr holds the last failing address. done is set at
// the end; running is high meanwhile. With the default pattern every data
// and check bit is written both as 0 and 1.
//
// The write/read-back/invert sequence follows the document. The pattern, the
// one-word-per-clock timing and the check-bit comparison are this design's.
// At one word per clock each pass moves 2 x 64 bits per word; at 66 MHz that
// is 4.2 Gbit/s of traffic in each direction of the pass.
//
// Only the low byte of the check-bit field is compared (sram_c_i[15:8] is
// unused), since the upper byte holds no check bits.
module sram_test
  import obc_pkg::*;
#(
  parameter int unsigned WORDS   = 262144,
  parameter int unsigned PASSES  = 2,
  parameter logic [63:0] PATTERN = 64'hA5A5_5A5A_0FF0_C33C
) (
  input  logic        clk,
  input  logic        rst,
  output logic [17:0] sram_a,
  output logic        sram_cs_n,
  output logic        sram_oe_n,
  output logic [7:0]  sram_bwe_n,
  output logic [63:0] sram_d_o,
  input  logic [63:0] sram_d_i,
  output logic [15:0] sram_c_o,
  input  logic [15:0] sram_c_i,
  output logic        sram_cwe_n,
  output logic        running,
  output logic        done,
  output logic [31:0] errors,
  output logic [17:0] fail_addr,
  output logic [7:0]  pass_no
);

  typedef enum logic [1:0] {T_WRITE, T_READ, T_DONE} tstate_e;

  tstate_e     st;
  logic [17:0] addr;
  logic [63:0] pat;
  logic [7:0]  chk;

  assign chk = edac_encode(pat);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= T_WRITE; addr <= '0; pat <= PATTERN; errors <= '0; fail_addr <= '0;
      pass_no <= '0; done <= 1'b0;
    end else begin
      unique case (st)
        T_WRITE: begin
          addr <= addr + 18'd1;
          if (addr == 18'(WORDS - 1)) begin
            addr <= '0;
            st   <= T_READ;
          end
        end
        T_READ: begin
          if (sram_d_i != pat || sram_c_i[7:0] != chk) begin
            errors    <= errors + 32'd1;
            fail_addr <= addr;
          end
          addr <= addr + 18'd1;
          if (addr == 18'(WORDS - 1)) begin
            addr    <= '0;
            pat     <= ~pat;
            pass_no <= pass_no + 8'd1;
            st      <= (pass_no == 8'(PASSES - 1)) ? T_DONE : T_WRITE;
          end
        end
        default: done <= 1'b1;
      endcase
    end
  end

  assign running    = (st != T_DONE);
  assign sram_a     = addr;
  assign sram_cs_n  = !(st == T_WRITE || st == T_READ);
  assign sram_oe_n  = !(st == T_READ);
  assign sram_bwe_n = (st == T_WRITE) ? 8'h00 : 8'hFF;
  assign sram_cwe_n = !(st == T_WRITE);
  assign sram_d_o   = pat;
  assign sram_c_o   = {8'h00, chk};

endmodule
