// sys_mgmt: system management register (0x7000_0000), the power-down controls
// of the board's peripherals.
//
// One 16-bit register on D(0-15) (big-endian bit k is value 16'h8000 >> k):
//   bit  9 UARTEN    1 = RS-232 receivers enabled        -> uart_rx_en
//   bit 10 UARTShdn  1 = RS-232 transceivers shut down   -> uart_shdn
//   bit 11 LVDSDEN   1 = LVDS bus drivers active         -> lvds_den
//   bit 12 LVDSREN   1 = LVDS receiver active            -> lvds_ren
//   bit 13 LVDSPwrn  1 = LVDS devices powered down       -> lvds_pwrdn
//   bit 14 TempStby  1 = temperature sensor in standby   -> temp_stby
//   bit 15 CurShdn   1 = current sensor shut down        -> cur_shdn
// Bits 0-8 read as zero. Reset value 16'h0058: every peripheral active.
// Each output follows its register bit; pins driven active low on the board
// are inverted outside the FPGA logic. All of this follows the document.
//
// The register bus read strobe (req.rd) is not used: reads here have no side effects.
module sys_mgmt
  import obc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,
  input  pbus_req_t   req,
  output logic [31:0] rdata,
  output logic        uart_rx_en,
  output logic        uart_shdn,
  output logic        lvds_den,
  output logic        lvds_ren,
  output logic        lvds_pwrdn,
  output logic        temp_stby,
  output logic        cur_shdn
);

  localparam logic [6:0] SMR_RESET = 7'h58;   // bits 9-15 of 16'h0058

  logic [6:0] smr;

  always_ff @(posedge clk) begin
    if (rst) smr <= SMR_RESET;
    else if (sel && req.wr && req.off == 4'h0) smr <= req.wdata[22:16];
  end

  assign rdata      = (req.off == 4'h0) ? {9'd0, smr, 16'd0} : 32'd0;
  assign uart_rx_en = smr[6];
  assign uart_shdn  = smr[5];
  assign lvds_den   = smr[4];
  assign lvds_ren   = smr[3];
  assign lvds_pwrdn = smr[2];
  assign temp_stby  = smr[1];
  assign cur_shdn   = smr[0];

endmodule
