// mc_chipsel: chip-select unit of the memory controller ("chipsel()").
//
// Decodes A(0-3) of the current transfer into the sixteen 256 MB regions of
// the board's memory map (Table 3-1 of the design description):
//   0x0 SRAM, 0x1 UART 1, 0x2 UART 2, 0x3 LVDS, 0x4/0x5 SCC channel A/B,
//   0x6 I2C, 0x7 system management, 0x8 debug port, 0xC interrupt
//   controller, 0xF Flash ROM; 0x9-0xB and 0xD-0xE are unmapped.
// It drives the external chip selects and output enables (SRAM SCS/SOE, Flash
// FCS/FOE, SCC XCS(0-1)/XOE) for as long as the cycle is active, gives the
// cycler the access time CTIME(0-3) in bus clocks and the flow to run, and
// flags CLAIM (the region exists) and DOERR (the transfer must end in error).
//
// A transfer ends in error when the region is unmapped, when it is a burst to
// anything but SRAM, or when its size is not one Table 3-1 allows for the
// region (SRAM and Flash also accept 8-byte single beats, the 64-bit
// instruction fetch; the interrupt controller also accepts 4-byte accesses,
// since its registers are 32 bits wide). The CTIME defaults are this design's
// choices for a 66 MHz bus: SRAM 15 ns -> 1, Flash 90 ns -> 6, SCC -> 8, FPGA
// registers -> 1. Combinational.
//
// The transfer-type bits xfer.tt are not used here; mc_start has already
// turned them into xfer.write and xfer.addr_only.
module mc_chipsel
  import obc_pkg::*;
#(
  parameter int unsigned SRAM_CTIME  = 1,
  parameter int unsigned FLASH_CTIME = 6,
  parameter int unsigned SCC_CTIME   = 8,
  parameter int unsigned REG_CTIME   = 1
) (
  input  xfer_t       xfer,
  input  logic        cyc_active,
  output region_e     region,
  output flow_e       flow,
  output logic [3:0]  ctime,     // CTIME(0-3)
  output logic        claim_n,   // CLAIM_L
  output logic        doerr_n,   // DOERR_L
  output logic        scs_n,     // SRAM chip select
  output logic        soe_n,     // SRAM output enable
  output logic        fcs_n,     // Flash chip select
  output logic        foe_n,     // Flash output enable
  output logic [1:0]  xcs_n,     // XCS(0-1): SCC channel A (xcs_n[1]) and B (xcs_n[0])
  output logic        xoe_n      // SCC output enable
);

  logic       mapped, size_ok, err;
  logic [3:0] n;
  logic       rd;

  always_comb begin
    region = region_e'(xfer.addr[31:28]);
    n      = tsiz_bytes(xfer.tsiz);
    rd     = !xfer.write;
    mapped = 1'b1;
    size_ok = 1'b1;
    ctime  = 4'(REG_CTIME);
    unique case (region)
      RG_SRAM:  begin ctime = 4'(SRAM_CTIME);  size_ok = xfer.burst || n inside {4'd1, 4'd2, 4'd4, 4'd8}; end
      RG_FLASH: begin ctime = 4'(FLASH_CTIME); size_ok = !xfer.burst && n inside {4'd1, 4'd2, 4'd4, 4'd8}; end
      RG_SCCA, RG_SCCB: begin ctime = 4'(SCC_CTIME); size_ok = !xfer.burst && n == 4'd1; end
      RG_UART1, RG_UART2, RG_I2C: size_ok = !xfer.burst && n == 4'd1;
      RG_LVDS, RG_SYSMGT, RG_DEBUG: size_ok = !xfer.burst && n inside {4'd1, 4'd2};
      RG_INTC:  size_ok = !xfer.burst && n inside {4'd2, 4'd4};
      default:  begin mapped = 1'b0; size_ok = 1'b0; end
    endcase
    if (xfer.addr_only) size_ok = 1'b1;
    err = !mapped || !size_ok;

    claim_n = !(cyc_active && mapped);
    doerr_n = !(cyc_active && err);

    if (err || xfer.addr_only) flow = FLOW_ERROR;
    else if (region == RG_SRAM) flow = xfer.burst ? FLOW_SRAM_BURST : FLOW_SRAM_SINGLE;
    else flow = FLOW_IO_FLASH;

    scs_n = !(cyc_active && !err && !xfer.addr_only && region == RG_SRAM);
    soe_n = !(!scs_n && rd);
    fcs_n = !(cyc_active && !err && !xfer.addr_only && region == RG_FLASH);
    foe_n = !(!fcs_n && rd);
    xcs_n[1] = !(cyc_active && !err && !xfer.addr_only && region == RG_SCCA);
    xcs_n[0] = !(cyc_active && !err && !xfer.addr_only && region == RG_SCCB);
    xoe_n = !((!xcs_n[1] || !xcs_n[0]) && rd);
  end

endmodule
