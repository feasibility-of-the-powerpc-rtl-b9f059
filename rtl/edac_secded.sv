// edac_secded: single-error-correcting, double-error-detecting Hamming code
// for one 64-bit memory word with eight check bits.
//
// Purely combinational. On a write the memory controller stores chk_out =
// encode(data_in) beside the data word. On a read it presents the stored word
// and check bits; the syndrome (recomputed parity XOR stored check bits) is
// zero for a clean word, has odd weight for a single-bit error and even,
// non-zero weight for a double error (the code's columns all have odd weight).
// A single error in a data bit is corrected in data_corr; a single error in a
// check bit leaves the data as read. single_err and multiple_err mirror the
// SingleErr/MultipleErr outputs of the EDAC unit simulated in the document;
// an odd syndrome that matches no column is reported as a multiple error.
//
// The code size (eight check bits per 64-bit word in a 16-bit check field)
// and the two reference codewords follow the document; the column assignment
// is this design's own (see obc_pkg). The document measured 26.2 ns for check
// bit generation and 153.3 ns for checking on its FPGA, so the memory
// controller registers the read word and checks it in the following cycle.
module edac_secded
  import obc_pkg::*;
(
  input  logic [63:0] data_in,      // word read from memory, or word to write
  input  logic [7:0]  chk_in,       // check bits read from memory
  output logic [7:0]  chk_out,      // check bits for data_in (write path)
  output logic [63:0] data_corr,    // corrected read word
  output logic [7:0]  syndrome,
  output logic        single_err,   // one bit wrong, corrected
  output logic        multiple_err  // uncorrectable
);

  logic [7:0] parity;
  logic       odd;
  logic       hit_data, hit_chk;

  assign parity   = edac_parity(data_in);
  assign chk_out  = parity ^ EDAC_CHK_INV;
  assign syndrome = chk_out ^ chk_in;
  assign odd      = ^syndrome;

  always_comb begin
    data_corr = data_in;
    hit_data  = 1'b0;
    for (int i = 0; i < 64; i++) begin
      if (syndrome == edac_col(6'(i))) begin
        data_corr[i] = ~data_in[i];
        hit_data     = 1'b1;
      end
    end
    hit_chk = (popcount8(syndrome) == 8'd1);
  end

  assign single_err   = odd && (hit_data || hit_chk);
  assign multiple_err = (syndrome != 8'h00) && !(odd && (hit_data || hit_chk));

endmodule
