// mc_bytedec: byte-lane decoder of the memory controller ("bytedec()").
//
// Produces the active-low byte write enables BWE(0-7) for the 64-bit data
// bus. Byte lane k carries the byte at address offset k within the double
// word (big-endian), D(8k..8k+7), which is vector bits [63-8k -: 8]; BWE(k) is
// bwe_n[7-k]. For a burst all eight lanes are enabled; otherwise the lanes
// from A(29-31) for TSIZ bytes (TSIZ = 000 meaning eight) are enabled. Lanes
// past the end of the double word are not enabled (the 603e does not issue
// such transfers). lanes is the same mask, active high, regardless of write,
// for use by the read-modify-write path. bwe_n is only asserted while en
// (the cycler's write strobe) and write are both high.
//
// Purely combinational. Function and inputs follow the document; the
// active-high lane output and the enable are this design's additions.
module mc_bytedec
  import obc_pkg::*;
(
  input  logic [2:0] a_lo,    // A(29-31)
  input  logic [2:0] tsiz,    // TSIZ(0-2)
  input  logic       burst,   // TBST asserted
  input  logic       write,   // WE_L of the figure, active high here
  input  logic       en,      // write strobe from the cycler
  output logic [7:0] lanes,   // lanes[7-k] = byte lane k in use
  output logic [7:0] bwe_n    // BWE(0-7), bwe_n[7-k] = BWE(k)
);

  logic [3:0] nbytes;

  always_comb begin
    nbytes = tsiz_bytes(tsiz);
    lanes  = '0;
    if (burst) begin
      lanes = 8'hFF;
    end else begin
      for (int k = 0; k < 8; k++) begin
        if (k >= int'(a_lo) && k < int'(a_lo) + int'(nbytes)) lanes[7-k] = 1'b1;
      end
    end
    bwe_n = ~(lanes & {8{write && en}});
  end

endmodule
