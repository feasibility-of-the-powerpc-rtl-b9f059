// obc_fpga: support FPGA of the PowerPC 603e on-board computer.
//
// The FPGA is the bridge between the 603e and everything else on the board.
// Its memory controller (mem_ctrl) answers the processor's 60x bus for the
// SRAM, the Flash ROM, the SCC and the FPGA's own register blocks, and
// protects the SRAM with an EDAC code whose check bits live in a separate
// SRAM. The register blocks are two UARTs, an I2C master (for the clock
// generator, RTC, temperature sensor and ADC), the LVDS link registers, the
// system management register, the debug/expansion port and the interrupt
// controller, which drives the processor's INT, SMI and MCP inputs. A reset
// controller resets the FPGA and gives the processor its hard reset.
//
// Besides normal operation (mode 0) the FPGA has three service modes that
// hold the processor in reset and take over the SRAM: mode 1 loads an
// S-record file received on UART 1 into the SRAM (srec_prog), mode 2 runs the
// SRAM write/read-back test (sram_test), mode 3 dumps the SRAM to UART 1
// (sram_dump). A service engine is held in reset while its mode is not
// selected, so selecting a mode starts it from the beginning.
//
// Memory map (A(0-3)): 0 SRAM, 1 UART 1, 2 UART 2, 3 LVDS, 4/5 SCC A/B,
// 6 I2C, 7 system management, 8 debug port, C interrupt controller, F Flash.
// Register offsets within a region are address bits A(24-27) (steps of
// 0x10). Active-low board signals carry an _n suffix; open-drain I2C lines are
// split into input and pull-low enable. All logic runs on the bus clock clk.
//
// Internal status not brought out to pins, left as probe points for a logic
// analyser: in_reset, the memory controller's busy flag, the service engines'
// running flags, the SRAM test's failing address and pass number, and the
// record, byte and error counters of the programmer and the dump engine.
module obc_fpga
  import obc_pkg::*;
#(
  parameter bit          EDAC_EN       = 1'b1,
  parameter int unsigned SRAM_CTIME    = 1,
  parameter int unsigned FLASH_CTIME   = 6,
  parameter int unsigned SCC_CTIME     = 8,
  parameter int unsigned REG_CTIME     = 1,
  parameter int unsigned DEBOUNCE      = 330000,
  parameter int unsigned INT_CYCLES    = 16,
  parameter int unsigned HRESET_CYCLES = 1024,
  parameter int unsigned SRAM_WORDS    = 262144,
  parameter logic [7:0]  SVC_UBRR      = 8'h30
) (
  input  logic        clk,
  input  logic        fpga_rst_n,
  input  logic [1:0]  mode,
  input  logic        cpu_rst_req,
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
  output logic        int_n,
  output logic        smi_n,
  output logic        mcp_n,
  output logic        hreset_n,
  // SRAM, check-bit SRAM and Flash
  output logic [18:0] mem_a,
  output logic [63:0] mem_d_o,
  output logic [7:0]  bwe_n,
  output logic        adsc_n,
  output logic        baa_n,
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
  input  logic        scc_int_n,
  // UARTs
  input  logic        u1_rxd,
  output logic        u1_txd,
  input  logic        u2_rxd,
  output logic        u2_txd,
  // I2C
  input  logic        scl_i,
  input  logic        sda_i,
  output logic        scl_oe,
  output logic        sda_oe,
  // LVDS serialiser / deserialiser
  output logic [9:0]  ser_din,
  output logic        ser_den,
  output logic        ser_sync,
  input  logic [9:0]  des_rout,
  input  logic        des_rclk,
  input  logic        des_lock_n,
  output logic        des_ren,
  // other interrupt inputs
  input  logic        temp_alarm_n,
  input  logic        rtc_int_n,
  // system management outputs
  output logic        uart_rx_en,
  output logic        uart_shdn,
  output logic        lvds_den,
  output logic        lvds_ren,
  output logic        lvds_pwrdn,
  output logic        temp_stby,
  output logic        cur_shdn,
  // debug / expansion
  input  logic [15:0] port_i,
  output logic [15:0] port_o,
  output logic [15:0] port_oe,
  output logic        exp_we_n,
  output logic [3:0]  led_n,
  input  logic [2:0]  sw_n,
  // service-mode status
  output logic        prog_done,
  output logic        prog_err,
  output logic        test_done,
  output logic [31:0] test_errors,
  output logic        dump_done,
  output logic        edac_corrected,
  output logic        edac_uncorrectable
);

  logic        rst, hreset_rc_n, in_reset;
  pbus_req_t   pb_req;
  region_e     pb_region;
  logic [31:0] pb_rdata;
  logic [31:0] rd_u1, rd_u2, rd_i2c, rd_lvds, rd_smr, rd_dbg, rd_int;
  logic        u1_rxc, u1_txc, u1_udre, u2_rxc, u2_txc, u2_udre, i2c_irq, lvds_irq;
  logic [15:0] port_irq;
  logic [2:0]  sw_irq;
  logic        mcp_req;
  logic        u1_txd_cpu, dump_txd, mc_busy;

  // memory controller side of the SRAM pins
  logic [18:0] mc_a;
  logic [7:0]  mc_bwe_n;
  logic        mc_scs_n, mc_soe_n, mc_cwe_n;
  logic [63:0] mc_d_o;
  logic [15:0] mc_c_o;

  // service engines' SRAM pins
  logic [17:0] pg_a, st_a, dp_a;
  logic        pg_cs_n, pg_oe_n, pg_cwe_n, st_cs_n, st_oe_n, st_cwe_n, dp_cs_n, dp_oe_n;
  logic [7:0]  pg_bwe_n, st_bwe_n;
  logic [63:0] pg_d_o, st_d_o;
  logic [15:0] pg_c_o, st_c_o;
  logic        st_running, dump_running;
  logic [17:0] st_fail;
  logic [7:0]  st_pass;
  logic [15:0] pg_recs, pg_bytes, pg_errs;
  logic [31:0] dp_bytes;

  reset_ctrl #(.INT_CYCLES(INT_CYCLES), .HRESET_CYCLES(HRESET_CYCLES)) u_reset (
    .clk, .fpga_rst_n, .cpu_rst_req, .rst_int(rst), .hreset_n(hreset_rc_n), .in_reset
  );
  assign hreset_n = hreset_rc_n && (mode == 2'd0);

  mem_ctrl #(
    .EDAC_EN(EDAC_EN), .SRAM_CTIME(SRAM_CTIME), .FLASH_CTIME(FLASH_CTIME),
    .SCC_CTIME(SCC_CTIME), .REG_CTIME(REG_CTIME)
  ) u_mc (
    .clk, .rst, .ts_n, .a, .tt, .tsiz, .tbst_n, .cpu_d_i, .cpu_d_o, .cpu_d_oe,
    .aack_n, .ta_n, .tea_n, .drtry_n, .baa_n, .adsc_n,
    .mem_a(mc_a), .mem_d_o(mc_d_o), .bwe_n(mc_bwe_n), .scs_n(mc_scs_n), .soe_n(mc_soe_n),
    .sram_d_i, .sram_c_o(mc_c_o), .sram_c_i, .sram_cwe_n(mc_cwe_n),
    .fcs_n, .foe_n, .flash_d_i, .xcs_n, .xoe_n, .scc_dc, .scc_d_i,
    .pb_req, .pb_region, .pb_rdata, .mcp_req, .edac_corrected, .busy(mc_busy)
  );
  assign edac_uncorrectable = mcp_req;

  // ------------------------------------------------------- register blocks
  uart u_uart1 (
    .clk, .rst, .sel(pb_region == RG_UART1), .req(pb_req), .rdata(rd_u1),
    .rxd(u1_rxd), .txd(u1_txd_cpu), .irq_rxc(u1_rxc), .irq_txc(u1_txc), .irq_udre(u1_udre)
  );
  uart u_uart2 (
    .clk, .rst, .sel(pb_region == RG_UART2), .req(pb_req), .rdata(rd_u2),
    .rxd(u2_rxd), .txd(u2_txd), .irq_rxc(u2_rxc), .irq_txc(u2_txc), .irq_udre(u2_udre)
  );
  i2c_master u_i2c (
    .clk, .rst, .sel(pb_region == RG_I2C), .req(pb_req), .rdata(rd_i2c), .irq(i2c_irq),
    .scl_i, .sda_i, .scl_oe, .sda_oe
  );
  lvds_ctrl u_lvds (
    .clk, .rst, .sel(pb_region == RG_LVDS), .req(pb_req), .rdata(rd_lvds), .irq(lvds_irq),
    .ser_din, .ser_den, .ser_sync, .des_rout, .des_rclk, .des_lock_n, .des_ren
  );
  sys_mgmt u_smr (
    .clk, .rst, .sel(pb_region == RG_SYSMGT), .req(pb_req), .rdata(rd_smr),
    .uart_rx_en, .uart_shdn, .lvds_den, .lvds_ren, .lvds_pwrdn, .temp_stby, .cur_shdn
  );
  debug_port #(.DEBOUNCE(DEBOUNCE)) u_dbg (
    .clk, .rst, .sel(pb_region == RG_DEBUG), .req(pb_req), .rdata(rd_dbg),
    .port_i, .port_o, .port_oe, .exp_we_n, .led_n, .sw_n, .port_irq, .sw_irq
  );
  int_ctrl u_int (
    .clk, .rst, .sel(pb_region == RG_INTC), .req(pb_req), .rdata(rd_int),
    .src({port_irq, !temp_alarm_n, lvds_irq, !rtc_int_n, !scc_int_n,
          u1_txc, u1_rxc, u1_udre, u2_txc, u2_rxc, u2_udre, i2c_irq, sw_irq}),
    .temp_alarm(!temp_alarm_n), .mcp_req, .int_n, .smi_n, .mcp_n
  );

  always_comb begin
    unique case (pb_region)
      RG_UART1:  pb_rdata = rd_u1;
      RG_UART2:  pb_rdata = rd_u2;
      RG_I2C:    pb_rdata = rd_i2c;
      RG_LVDS:   pb_rdata = rd_lvds;
      RG_SYSMGT: pb_rdata = rd_smr;
      RG_DEBUG:  pb_rdata = rd_dbg;
      RG_INTC:   pb_rdata = rd_int;
      default:   pb_rdata = '0;
    endcase
  end

  // ------------------------------------------------------ service engines
  srec_prog #(.UBRR(SVC_UBRR)) u_prog (
    .clk, .rst(rst || mode != 2'd1), .rxd(u1_rxd),
    .sram_a(pg_a), .sram_cs_n(pg_cs_n), .sram_oe_n(pg_oe_n), .sram_bwe_n(pg_bwe_n),
    .sram_d_o(pg_d_o), .sram_d_i, .sram_c_o(pg_c_o), .sram_cwe_n(pg_cwe_n),
    .done(prog_done), .chk_err(prog_err), .rec_count(pg_recs), .byte_count(pg_bytes),
    .err_count(pg_errs)
  );

  sram_test #(.WORDS(SRAM_WORDS)) u_test (
    .clk, .rst(rst || mode != 2'd2),
    .sram_a(st_a), .sram_cs_n(st_cs_n), .sram_oe_n(st_oe_n), .sram_bwe_n(st_bwe_n),
    .sram_d_o(st_d_o), .sram_d_i, .sram_c_o(st_c_o), .sram_c_i, .sram_cwe_n(st_cwe_n),
    .running(st_running), .done(test_done), .errors(test_errors), .fail_addr(st_fail),
    .pass_no(st_pass)
  );

  sram_dump #(.WORDS(SRAM_WORDS), .UBRR(SVC_UBRR)) u_dump (
    .clk, .rst(rst || mode != 2'd3),
    .sram_a(dp_a), .sram_cs_n(dp_cs_n), .sram_oe_n(dp_oe_n), .sram_d_i,
    .txd(dump_txd), .done(dump_done), .bytes_sent(dp_bytes)
  );
  assign dump_running = (mode == 2'd3) && !dump_done;

  assign u1_txd = (mode == 2'd3) ? dump_txd : u1_txd_cpu;

  // SRAM pin ownership
  always_comb begin
    unique case (mode)
      2'd1: begin
        mem_a = {1'b0, pg_a}; mem_d_o = pg_d_o; bwe_n = pg_bwe_n; scs_n = pg_cs_n;
        soe_n = pg_oe_n; sram_c_o = pg_c_o; sram_cwe_n = pg_cwe_n;
      end
      2'd2: begin
        mem_a = {1'b0, st_a}; mem_d_o = st_d_o; bwe_n = st_bwe_n; scs_n = st_cs_n;
        soe_n = st_oe_n; sram_c_o = st_c_o; sram_cwe_n = st_cwe_n;
      end
      2'd3: begin
        mem_a = {1'b0, dp_a}; mem_d_o = '0; bwe_n = 8'hFF; scs_n = dp_cs_n;
        soe_n = dp_oe_n; sram_c_o = '0; sram_cwe_n = 1'b1;
      end
      default: begin
        mem_a = mc_a; mem_d_o = mc_d_o; bwe_n = mc_bwe_n; scs_n = mc_scs_n;
        soe_n = mc_soe_n; sram_c_o = mc_c_o; sram_cwe_n = mc_cwe_n;
      end
    endcase
  end

endmodule
