// sram_model: behavioural model of the board's SRAM bank for testbenches.
//
// WORDS 64-bit data words (four 256Kx16 devices at full size) beside a 16-bit
// check-bit memory (the fifth device). Reads are asynchronous: d_o/c_o show
// the addressed word while cs_n and oe_n are low. Writes take effect at the
// rising clock edge while cs_n is low: each byte lane k with bwe_n[7-k] low is
// written, and the check bits when cwe_n is low. Every word starts as zero with
// check bits 16'h0030, a valid EDAC codeword.
module sram_model #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [17:0] a,
  input  logic        cs_n,
  input  logic        oe_n,
  input  logic [7:0]  bwe_n,
  input  logic [63:0] d_i,
  output logic [63:0] d_o,
  input  logic        cwe_n,
  input  logic [15:0] c_i,
  output logic [15:0] c_o
);
  logic [63:0] mem  [WORDS];
  logic [15:0] cmem [WORDS];
  int unsigned idx;

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      mem[i]  = '0;
      cmem[i] = 16'h0030;
    end
  end

  assign idx = 32'(a) % WORDS;
  assign d_o = (!cs_n && !oe_n) ? mem[idx]  : '0;
  assign c_o = (!cs_n && !oe_n) ? cmem[idx] : '0;

  always @(posedge clk) begin
    if (!cs_n) begin
      for (int k = 0; k < 8; k++)
        if (!bwe_n[k]) mem[idx][8*k +: 8] <= d_i[8*k +: 8];
      if (!cwe_n) cmem[idx] <= c_i;
    end
  end
endmodule
