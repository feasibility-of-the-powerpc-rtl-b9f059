// mc_start: start-detection module of the memory controller ("start()").
//
// Watches the 603e address bus. When TS is sampled asserted it latches the
// address, transfer type, size and burst attribute, and raises cyc_active,
// which stays high until the controller ends the address tenure by asserting
// AACK (aack_n sampled low). new_cyc is high for the first clock of the cycle
// only. write (WE_L in the document's figure, here active high) tells whether
// the transfer writes; addr_only marks address-only transfers (sync, eieio,
// cache operations), which end with AACK and no data.
//
// Timing: TS sampled at edge k -> cyc_active and new_cyc from edge k, one
// register stage after the bus. adsc_n is a one-clock address strobe for the
// memories at the start of the cycle.
//
// From the document: the module gives the cycle-in-progress and write
// signals, valid until AACK. The latching of the address and the TT decoding
// (TT3 = data tenure, TT1 = read) are this design's, from the 60x bus rules.
module mc_start
  import obc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ts_n,
  input  logic [31:0] a,
  input  logic [4:0]  tt,
  input  logic [2:0]  tsiz,
  input  logic        tbst_n,
  input  logic        aack_n,     // AACK as driven by the controller
  output xfer_t       xfer,
  output logic        cyc_active,
  output logic        new_cyc,
  output logic        write,
  output logic        adsc_n
);

  always_ff @(posedge clk) begin
    if (rst) begin
      xfer       <= '0;
      cyc_active <= 1'b0;
      new_cyc    <= 1'b0;
      adsc_n     <= 1'b1;
    end else begin
      new_cyc <= 1'b0;
      adsc_n  <= 1'b1;
      if (!ts_n && !cyc_active) begin
        xfer.addr      <= a;
        xfer.tt        <= tt;
        xfer.tsiz      <= tsiz;
        xfer.burst     <= !tbst_n;
        xfer.write     <= tt_has_data(tt[1]) && !tt_is_read(tt[3]);
        xfer.addr_only <= !tt_has_data(tt[1]);
        cyc_active     <= 1'b1;
        new_cyc        <= 1'b1;
        adsc_n         <= 1'b0;
      end else if (!aack_n) begin
        cyc_active <= 1'b0;
      end
    end
  end

  assign write = xfer.write;

endmodule
