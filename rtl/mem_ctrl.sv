// mem_ctrl: the support FPGA's memory controller with EDAC.
//
// Connects the 603e 60x bus to the board's SRAM (with its check-bit memory),
// Flash ROM, SCC and the register blocks inside the FPGA. It is built from the
// four modules of the controller it is modelled on (start detection, byte-lane
// decoder, chip-select unit, cycler) plus the EDAC unit:
//
//   mc_start   latches the transfer on TS and holds it until AACK;
//   mc_chipsel decodes A(0-3), gives chip selects, CTIME and the flow;
//   mc_bytedec gives BWE(0-7) from TSIZ, A(29-31) and TBST;
//   mc_cycler  sequences AACK/TA/TEA/DRTRY and the memory strobes;
//   edac_secded encodes write data and checks the registered read word.
//
// Data paths (the FPGA sits in the data path in this design): read data from
// the selected device goes straight to cpu_d_o with TA and is also registered;
// the EDAC unit checks that register in the next clock. A corrected word is
// driven to the CPU in the DRTRY clock and the following TA clock, and written
// back to the SRAM with fresh check bits. Writes carry cpu_d_i to the memory
// with check bits computed from it; partial SRAM writes are merged with the
// corrected old word first. Register blocks see a one-cycle strobe bus
// (pb_req, pb_region) and return pb_rdata on D(0-31).
//
// Addresses: mem_a is the 64-bit word address (A(10-28)); SRAM uses the low 18
// bits (2 MB), Flash all 19 (4 MB). Burst beats wrap within the 32-byte line
// starting at the requested double word. The SCC's data/control line scc_dc
// is A(27) (offset 0x10), a choice of this design.
//
// Unused on purpose: the upper byte of the check-bit field (sram_c_i[15:8],
// written as zero), chipsel's claim_n/doerr_n (the cycler gets the same
// information as the flow), chipsel's SRAM output enable (replaced here by one
// that also covers the read phases of scrub and read-modify-write), and the
// EDAC unit's recomputed check bits and syndrome (only its error flags and
// corrected word are needed).
module mem_ctrl
  import obc_pkg::*;
#(
  parameter bit          EDAC_EN     = 1'b1,
  parameter int unsigned SRAM_CTIME  = 1,
  parameter int unsigned FLASH_CTIME = 6,
  parameter int unsigned SCC_CTIME   = 8,
  parameter int unsigned REG_CTIME   = 1
) (
  input  logic        clk,
  input  logic        rst,
  // 603e bus
  input  logic        ts_n,
  input  logic [31:0] a,
  input  logic [4:0]  tt,
  input  logic [2:0]  tsiz,
  input  logic        tbst_n,
  input  logic [63:0] cpu_d_i,
  output logic [63:0] cpu_d_o,
  output logic        cpu_d_oe,
  output logic        aack_n,
  output logic        ta_n,
  output logic        tea_n,
  output logic        drtry_n,
  output logic        baa_n,
  output logic        adsc_n,
  // memories
  output logic [18:0] mem_a,
  output logic [63:0] mem_d_o,
  output logic [7:0]  bwe_n,
  output logic        scs_n,
  output logic        soe_n,
  input  logic [63:0] sram_d_i,
  output logic [15:0] sram_c_o,
  input  logic [15:0] sram_c_i,
  output logic        sram_cwe_n,
  output logic        fcs_n,
  output logic        foe_n,
  input  logic [63:0] flash_d_i,
  // SCC
  output logic [1:0]  xcs_n,
  output logic        xoe_n,
  output logic        scc_dc,
  input  logic [7:0]  scc_d_i,
  // FPGA registers
  output pbus_req_t   pb_req,
  output region_e     pb_region,
  input  logic [31:0] pb_rdata,
  // EDAC events
  output logic        mcp_req,
  output logic        edac_corrected,
  output logic        busy
);

  xfer_t      xfer;
  logic       cyc_active, new_cyc, write;
  region_e    region;
  flow_e      flow;
  logic [3:0] ctime;
  logic       claim_n, doerr_n;
  logic       soe_cs_n;
  logic [7:0] lanes, bwe_cpu_n;
  logic [1:0] beat;
  logic       cap, use_corr, mem_we, scrub_we, rmw_we, rmw_rd, pb_rd, pb_wr;
  logic [63:0] raw_rd, raw_q, corr_q, data_corr, merged;
  logic [7:0]  chk_q, chk_new, chk_rd, syndrome;
  logic        single_err, multiple_err;

  mc_start u_start (
    .clk, .rst, .ts_n, .a, .tt, .tsiz, .tbst_n, .aack_n,
    .xfer, .cyc_active, .new_cyc, .write, .adsc_n
  );

  mc_chipsel #(
    .SRAM_CTIME(SRAM_CTIME), .FLASH_CTIME(FLASH_CTIME),
    .SCC_CTIME(SCC_CTIME), .REG_CTIME(REG_CTIME)
  ) u_chipsel (
    .xfer, .cyc_active, .region, .flow, .ctime, .claim_n, .doerr_n,
    .scs_n, .soe_n(soe_cs_n), .fcs_n, .foe_n, .xcs_n, .xoe_n
  );

  mc_bytedec u_bytedec (
    .a_lo(xfer.addr[2:0]), .tsiz(xfer.tsiz), .burst(xfer.burst),
    .write, .en(mem_we), .lanes, .bwe_n(bwe_cpu_n)
  );

  mc_cycler #(.EDAC_EN(EDAC_EN)) u_cycler (
    .clk, .rst, .new_cyc, .flow, .ctime, .write, .addr_only(xfer.addr_only),
    .full_word(lanes == 8'hFF), .single_err, .multiple_err,
    .aack_n, .ta_n, .tea_n, .drtry_n, .baa_n, .beat, .cap, .use_corr,
    .mem_we, .scrub_we, .rmw_we, .rmw_rd, .pb_rd, .pb_wr, .mcp_req, .busy
  );

  // Check of the registered read word.
  edac_secded u_edac_rd (
    .data_in(raw_q), .chk_in(chk_q), .chk_out(chk_rd), .data_corr,
    .syndrome, .single_err, .multiple_err
  );

  // ---------------------------------------------------------------- address
  assign mem_a  = {xfer.addr[21:5], xfer.addr[4:3] + beat};
  assign scc_dc = xfer.addr[4];

  // -------------------------------------------------------------- read path
  always_comb begin
    unique case (region)
      RG_SRAM:          raw_rd = sram_d_i;
      RG_FLASH:         raw_rd = flash_d_i;
      RG_SCCA, RG_SCCB: raw_rd = {scc_d_i, 56'd0};
      default:          raw_rd = {pb_rdata, 32'd0};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      raw_q  <= '0;
      chk_q  <= EDAC_CHK_INV;
      corr_q <= '0;
    end else begin
      if (cap) begin
        raw_q <= raw_rd;
        chk_q <= sram_c_i[7:0];
      end
      if (scrub_we) corr_q <= data_corr;
    end
  end

  assign cpu_d_o  = scrub_we ? data_corr : (use_corr ? corr_q : raw_rd);
  assign cpu_d_oe = !write && (!ta_n || !drtry_n);

  // ------------------------------------------------------------- write path
  always_comb begin
    for (int k = 0; k < 8; k++)
      merged[8*k +: 8] = lanes[k] ? cpu_d_i[8*k +: 8] : data_corr[8*k +: 8];
    if (scrub_we)    mem_d_o = data_corr;
    else if (rmw_we) mem_d_o = merged;
    else             mem_d_o = cpu_d_i;
  end

  assign chk_new  = edac_encode(mem_d_o);
  assign sram_c_o = {8'h00, chk_new};

  always_comb begin
    bwe_n = bwe_cpu_n;
    if (scrub_we || rmw_we) bwe_n = 8'h00;
    sram_cwe_n = !(region == RG_SRAM &&
                   (scrub_we || rmw_we || (mem_we && write && lanes == 8'hFF)));
    soe_n = scs_n || !((!write && !scrub_we) || rmw_rd);
  end

  // ---------------------------------------------------------- register bus
  assign pb_region    = region;
  assign pb_req.wr    = pb_wr && !(region inside {RG_SRAM, RG_FLASH, RG_SCCA, RG_SCCB});
  assign pb_req.rd    = pb_rd && !(region inside {RG_SRAM, RG_FLASH, RG_SCCA, RG_SCCB});
  assign pb_req.off   = xfer.addr[7:4];
  assign pb_req.wdata = cpu_d_i[63:32];

  assign edac_corrected = scrub_we;

  // --------------------------------------------------------------- checks
  // TA and TEA never in the same clock; DRTRY never with TA.
  assert property (@(posedge clk) disable iff (rst) !(!ta_n && !tea_n));
  assert property (@(posedge clk) disable iff (rst) !(!ta_n && !drtry_n));

endmodule
