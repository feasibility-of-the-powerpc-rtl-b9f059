// sram_dump: sends the SRAM contents out of UART 1 for inspection.
//
// Reads the words from address 0 to WORDS-1 and sends each as eight bytes,
// most significant byte (byte lane 0, the lowest byte address) first, as 8N1
// characters at f_clk / (16 (UBRR + 1)) baud. Each word is read when the
// transmitter has taken the last byte of the previous one. done is set after
// the last byte's stop bit. That the SRAM is dumped to UART 1 follows the
// document; the binary byte stream and its order are this design's choice.
module sram_dump
  import obc_pkg::*;
#(
  parameter int unsigned WORDS = 262144,
  parameter logic [7:0]  UBRR  = 8'h30
) (
  input  logic        clk,
  input  logic        rst,
  output logic [17:0] sram_a,
  output logic        sram_cs_n,
  output logic        sram_oe_n,
  input  logic [63:0] sram_d_i,
  output logic        txd,
  output logic        done,
  output logic [31:0] bytes_sent
);

  typedef enum logic [1:0] {D_READ, D_SEND, D_WAIT, D_DONE} dstate_e;

  dstate_e     st;
  logic [17:0] addr;
  logic [63:0] word;
  logic [2:0]  bidx;
  logic [7:0]  div;
  logic        tick16, tx_busy, tx_done, load;

  always_ff @(posedge clk) begin
    if (rst || div >= UBRR) div <= '0;
    else div <= div + 8'd1;
  end
  assign tick16 = (div >= UBRR);

  assign load = (st == D_SEND) && !tx_busy;

  uart_tx u_tx (
    .clk, .rst, .tick16, .load, .data({1'b0, word[63:56]}), .nine(1'b0),
    .busy(tx_busy), .done(tx_done), .txd
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= D_READ; addr <= '0; word <= '0; bidx <= '0; done <= 1'b0; bytes_sent <= '0;
    end else begin
      unique case (st)
        D_READ: begin
          word <= sram_d_i;
          bidx <= '0;
          st   <= D_SEND;
        end
        D_SEND: if (load) begin
          word       <= {word[55:0], 8'h00};
          bytes_sent <= bytes_sent + 32'd1;
          bidx       <= bidx + 3'd1;
          if (bidx == 3'd7) begin
            if (addr == 18'(WORDS - 1)) st <= D_WAIT;
            else begin
              addr <= addr + 18'd1;
              st   <= D_READ;
            end
          end
        end
        D_WAIT: if (tx_done) begin
          st   <= D_DONE;
          done <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign sram_a    = addr;
  assign sram_cs_n = !(st == D_READ);
  assign sram_oe_n = !(st == D_READ);

endmodule
