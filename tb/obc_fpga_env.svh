// obc_fpga_env.svh: board environment and end-to-end test sequence for the
// support FPGA, shared by the reduced-size and the full-size top-level
// testbenches. The including module defines the localparams W (SRAM words),
// HC (processor reset clocks), DB (debounce clocks), SVC_BIT (service-mode
// bit time in clocks), CPU_UBRR, DUMP_ALL (wait for the whole dump) and then
// instantiates obc_fpga as dut with (.*).
//
// The board: an SRAM model with its check-bit memory, a Flash array, an SCC
// data byte, a real-time-clock model on the I2C bus, an LVDS deserialiser
// driven by the bench, switches, the temperature alarm and serial lines. The
// bench plays the 603e through the bus-master tasks.
//
// Every mechanism of the design is exercised and counted: processor reset
// release, SRAM single and burst transfers, wait states (stall clocks),
// read-modify-write, EDAC correction with DRTRY, write-back of corrected
// words, machine check on a double error, TEA, address-only transfers, Flash
// and SCC access, UART transmit/receive with its interrupt on INT, I2C
// transfers with the clock chip, LVDS reception, system management outputs,
// LEDs and a debounced switch interrupt, SMI, a processor reset request, and
// the three service modes (S-record programmer, SRAM test, SRAM dump) with
// the switches between them and normal mode. A mechanism that never happens
// counts as a failure.
import obc_pkg::*;

logic clk = 0, fpga_rst_n = 0, cpu_rst_req = 0;
logic [1:0] mode = 0;
logic ts_n = 1, tbst_n = 1;
logic [31:0] a = 0;
logic [4:0] tt = 0;
logic [2:0] tsiz = 0;
logic [63:0] cpu_d_i = 0, cpu_d_o, mem_d_o, sram_d_i, flash_d_i;
logic cpu_d_oe, aack_n, ta_n, tea_n, drtry_n, int_n, smi_n, mcp_n, hreset_n;
logic [18:0] mem_a;
logic [7:0] bwe_n;
logic adsc_n, baa_n, scs_n, soe_n, sram_cwe_n, fcs_n, foe_n;
logic [15:0] sram_c_o, sram_c_i;
logic [1:0] xcs_n;
logic xoe_n, scc_dc;
logic [7:0] scc_d_i = 8'h3E;
logic scc_int_n = 1;
logic u1_rxd = 1, u1_txd, u2_rxd = 1, u2_txd;
logic scl_i, sda_i, scl_oe, sda_oe, rtc_sda_oe;
logic [9:0] ser_din, des_rout = 0;
logic ser_den, ser_sync, des_rclk = 0, des_lock_n = 0, des_ren;
logic temp_alarm_n = 1, rtc_int_n = 1;
logic uart_rx_en, uart_shdn, lvds_den, lvds_ren, lvds_pwrdn, temp_stby, cur_shdn;
logic [15:0] port_i = 16'h0000, port_o, port_oe;
logic exp_we_n;
logic [3:0] led_n;
logic [2:0] sw_n = 3'b111;
logic prog_done, prog_err, test_done, dump_done, edac_corrected, edac_uncorrectable;
logic [31:0] test_errors;

int checks = 0, failures = 0;
logic [63:0] flash [512];

sram_model #(.WORDS(W)) mem (
  .clk, .a(mem_a[17:0]), .cs_n(scs_n), .oe_n(soe_n), .bwe_n, .d_i(mem_d_o), .d_o(sram_d_i),
  .cwe_n(sram_cwe_n), .c_i(sram_c_o), .c_o(sram_c_i));
assign flash_d_i = (!fcs_n && !foe_n) ? flash[mem_a[8:0]] : '0;

wire scl = !scl_oe;
wire sda = !(sda_oe || rtc_sda_oe);
assign scl_i = scl;
assign sda_i = sda;
i2c_slave_model #(.ADDR(7'h68)) u_rtc (.scl, .sda, .sda_oe(rtc_sda_oe));

always #5 clk = !clk;

// SCL period, in clocks, between the last two rising edges
int cyc_no = 0, scl_rise = -1, scl_period = 0;
logic scl_q = 1'b1;
always @(posedge clk) begin
  cyc_no++;
  scl_q <= scl;
  if (scl && !scl_q) begin
    if (scl_rise >= 0) scl_period = cyc_no - scl_rise;
    scl_rise = cyc_no;
  end
end
`include "cpu_bus_tasks.svh"

// ------------------------------------------------------ mechanism counters
int m_reset = 0, m_single = 0, m_burst = 0, m_stall = 0, m_rmw = 0, m_drtry = 0;
int m_scrub = 0, m_mcp = 0, m_tea = 0, m_aonly = 0, m_flash = 0, m_scc = 0;
int m_uart_tx = 0, m_uart_rx = 0, m_int = 0, m_i2c = 0, m_lvds = 0, m_smr = 0;
int m_led = 0, m_switch = 0, m_smi = 0, m_cpu_rst = 0;
int m_mode_prog = 0, m_mode_test = 0, m_mode_dump = 0, m_mode_normal = 0;
logic int_q = 1, smi_q = 1, mcp_q = 1;
always @(posedge clk) begin
  if (hreset_n) begin
    if (edac_corrected) m_scrub++;
    if (!mcp_n && mcp_q) m_mcp++;
    if (!int_n && int_q) m_int++;
    if (!smi_n && smi_q) m_smi++;
  end
  int_q <= int_n; smi_q <= smi_n; mcp_q <= mcp_n;
end

task automatic chk(input logic ok, input string what);
  checks++;
  if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
endtask

task automatic mech(input string name, input int n);
  $display("mechanism %-22s %0d", name, n);
  checks++;
  if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
endtask

// ------------------------------------------------------------ serial lines
task automatic ser_send(input logic [7:0] ch, input int bitt);
  u1_rxd = 0; repeat (bitt) @(posedge clk);
  for (int i = 0; i < 8; i++) begin u1_rxd = ch[i]; repeat (bitt) @(posedge clk); end
  u1_rxd = 1; repeat (bitt) @(posedge clk);
endtask

task automatic ser_recv(input int bitt, output logic [7:0] ch, output logic ok);
  int t;
  t = 0; ch = 0;
  while (u1_txd && t < 40 * bitt) begin @(posedge clk); t++; end
  repeat (bitt + bitt / 2) @(posedge clk);
  for (int i = 0; i < 8; i++) begin ch[i] = u1_txd; repeat (bitt) @(posedge clk); end
  ok = u1_txd && t < 40 * bitt;
endtask

function automatic logic [7:0] hexc(input logic [3:0] n);
  return (n < 10) ? 8'(8'h30 + n) : 8'(8'h37 + n);
endfunction

task automatic srec_send(input int typ, input logic [15:0] addr, input logic [7:0] data [], input int bitt);
  logic [7:0] sum, cnt;
  cnt = 8'(3 + data.size());
  sum = cnt + addr[15:8] + addr[7:0];
  ser_send("S", bitt); ser_send(hexc(4'(typ)), bitt);
  ser_send(hexc(cnt[7:4]), bitt); ser_send(hexc(cnt[3:0]), bitt);
  for (int k = 12; k >= 0; k -= 4) ser_send(hexc(addr[k +: 4]), bitt);
  foreach (data[k]) begin
    sum += data[k];
    ser_send(hexc(data[k][7:4]), bitt); ser_send(hexc(data[k][3:0]), bitt);
  end
  sum = ~sum;
  ser_send(hexc(sum[7:4]), bitt); ser_send(hexc(sum[3:0]), bitt);
  ser_send(8'h0D, bitt); ser_send(8'h0A, bitt);
endtask

// I2C command through the bus: write CR, poll SR until TIP clears
task automatic i2c_cmd(input logic [7:0] c, output logic [7:0] sr);
  int n;
  reg_write8(32'h6000_0040, c);
  n = 0;
  do begin reg_read8(32'h6000_0040, sr); n++; end while (sr[1] && n < 5000);
  reg_write8(32'h6000_0040, 8'h01);
endtask

localparam logic [63:0] PAT = 64'hA5A5_5A5A_0FF0_C33C;

initial begin
  logic [63:0] d, wd [4], rd [4];
  logic [31:0] v32;
  logic [15:0] v16;
  logic [7:0] v8, sr;
  logic e, ok;
  int t, ta0;

  for (int i = 0; i < 512; i++) flash[i] = {$urandom, $urandom};

  // ---------------------------------------------------------------- reset
  repeat (5) @(posedge clk);
  fpga_rst_n = 1;
  t = 0;
  while (!hreset_n && t < HC + 100) begin @(posedge clk); t++; end
  chk(hreset_n && t >= HC, "processor reset released after its pulse");
  if (hreset_n) m_reset++;

  // ------------------------------------------------------------- SRAM
  for (int i = 0; i < 4; i++) begin
    bus_write(32'(i * 8), 3'd0, {32'(i), 32'hC0DE_0000 + 32'(i)}, e);
    bus_read(32'(i * 8), 3'd0, d, e);
    chk(!e && d == {32'(i), 32'hC0DE_0000 + 32'(i)}, "SRAM single write/read");
    if (!e && d == {32'(i), 32'hC0DE_0000 + 32'(i)}) m_single++;
  end
  for (int k = 0; k < 4; k++) wd[k] = {$urandom, $urandom};
  bus_burst_write(32'h0000_0200, wd, e);
  bus_burst_read(32'h0000_0200, rd, e);
  chk(rd == wd, "SRAM burst");
  if (rd == wd) m_burst++;
  // read-modify-write
  bus_write(32'h0000_0003, 3'd1, 64'h0000_0077_0000_0000, e);
  bus_read(32'h0000_0000, 3'd0, d, e);
  chk(d == 64'h0000_0077_C0DE_0000 && mem.cmem[0][7:0] == edac_encode(mem.mem[0]), "byte write by read-modify-write");
  if (d == 64'h0000_0077_C0DE_0000) m_rmw++;
  // EDAC correction
  mem.mem[1][33] = !mem.mem[1][33];
  bus_read(32'h0000_0008, 3'd0, d, e);
  chk(d == {32'd1, 32'hC0DE_0001} && bus_drtry > 0, "single-bit error corrected with DRTRY");
  m_drtry = bus_drtry;
  chk(mem.mem[1] == {32'd1, 32'hC0DE_0001}, "corrected word written back");
  // machine check
  mem.mem[2][1] = !mem.mem[2][1]; mem.mem[2][50] = !mem.mem[2][50];
  bus_read(32'h0000_0010, 3'd0, d, e);
  repeat (3) @(posedge clk);
  chk(m_mcp > 0, "double error raises MCP");
  bus_write(32'h0000_0010, 3'd0, 64'd0, e);
  // Flash with wait states
  bus_read(32'hF000_0018, 3'd0, d, e);
  chk(!e && d == flash[3], "Flash read");
  if (!e && d == flash[3]) m_flash++;
  m_stall = bus_stall;
  // SCC
  bus_read(32'h5000_0000, 3'd1, d, e);
  chk(!e && d[63:56] == 8'h3E, "SCC read");
  if (!e && d[63:56] == 8'h3E) m_scc++;
  // TEA and address-only
  bus_read(32'hA000_0000, 3'd0, d, e);
  chk(e, "unmapped region ends with TEA");
  m_tea = bus_tea;
  ta0 = bus_ta;
  bus_xfer(32'h0000_0000, 5'b00000, 3'd0, 1'b0, wd, rd, e);
  chk(!e && bus_ta == ta0, "address-only transfer");
  if (!e && bus_ta == ta0) m_aonly++;

  // ------------------------------------------------ UART 1 and interrupts
  reg_write8(32'h1000_0090, 8'(CPU_UBRR));
  reg_write8(32'h1000_00A0, 8'h98);                 // RXCIE RXEN TXEN
  reg_write32(32'hC000_0010, 32'h8000_0100);        // GIE + UART1 RXC
  reg_read32(32'hC000_0010, v32);
  chk(v32 == 32'h8000_0100, "interrupt mask");
  reg_write8(32'h1000_00C0, 8'h4F);
  ser_recv(16 * (CPU_UBRR + 1), v8, ok);
  chk(ok && v8 == 8'h4F, "UART 1 transmit");
  if (ok && v8 == 8'h4F) m_uart_tx++;
  chk(int_n, "no interrupt before reception");
  ser_send(8'h6B, 16 * (CPU_UBRR + 1));
  repeat (4) @(posedge clk);
  chk(!int_n, "receive interrupt on INT");
  reg_read32(32'hC000_0000, v32);
  chk(v32 == 32'h0000_0100, "INT_REG shows UART 1 RXC");
  reg_read8(32'h1000_00C0, v8);
  chk(v8 == 8'h6B, "UART 1 receive");
  if (v8 == 8'h6B) m_uart_rx++;
  repeat (4) @(posedge clk);
  chk(int_n, "interrupt cleared by reading UDR");

  // ---------------------------------------------------------------- I2C
  reg_write8(32'h6000_0000, 8'(I2C_PRE));
  reg_write8(32'h6000_0010, 8'(I2C_PRE >> 8));
  reg_write8(32'h6000_0020, 8'h80);
  reg_write8(32'h6000_0030, 8'hD0); i2c_cmd(8'h90, sr);
  chk(!sr[7], "clock chip acknowledges");
  reg_write8(32'h6000_0030, 8'h02); i2c_cmd(8'h10, sr);
  reg_write8(32'h6000_0030, 8'h59); i2c_cmd(8'h50, sr);
  reg_write8(32'h6000_0030, 8'hD0); i2c_cmd(8'h90, sr);
  reg_write8(32'h6000_0030, 8'h02); i2c_cmd(8'h10, sr);
  reg_write8(32'h6000_0030, 8'hD1); i2c_cmd(8'h90, sr);
  i2c_cmd(8'h60, sr);
  reg_read8(32'h6000_0030, v8);
  chk(v8 == 8'h59 && u_rtc.regs[2] == 8'h59, "I2C write and read back of a clock register");
  if (v8 == 8'h59) m_i2c++;
  chk(scl_period == 5 * (I2C_PRE + 1), "SCL period is 5 x (prescale + 1) clocks");

  // --------------------------------------------------------------- LVDS
  reg_write8(32'h3000_0010, 8'h40);
  reg_read8(32'h3000_0020, v8);
  chk(v8 == 8'h01, "LVDS lock");
  des_rout = 10'h2C7;
  repeat (3) @(posedge clk); des_rclk = 1; repeat (4) @(posedge clk); des_rclk = 0;
  repeat (3) @(posedge clk);
  reg_read16(32'h3000_0000, v16);
  chk(v16 == 16'h02C7, "LVDS word received");
  if (v16 == 16'h02C7) m_lvds++;

  // ---------------------------------------------------- system management
  reg_read16(32'h7000_0000, v16);
  chk(v16 == 16'h0058, "SMR reset value");
  reg_write16(32'h7000_0000, 16'h0007);
  chk(!uart_rx_en && !lvds_den && lvds_pwrdn && temp_stby && cur_shdn, "SMR outputs");
  if (lvds_pwrdn && cur_shdn) m_smr++;

  // ------------------------------------------------ LEDs, switch and SMI
  reg_write16(32'h8000_0020, 16'h000A);
  chk(led_n == 4'hA, "LEDs");
  if (led_n == 4'hA) m_led++;
  reg_write32(32'hC000_0010, 32'h8000_0004);        // GIE + switch 1
  sw_n[2] = 0;
  repeat (DB + 20) @(posedge clk);
  reg_read32(32'hC000_0000, v32);
  chk(v32 == 32'h0000_0004 && !int_n, "debounced switch interrupt");
  if (v32 == 32'h0000_0004) m_switch++;
  sw_n[2] = 1;
  repeat (DB + 20) @(posedge clk);
  chk(int_n, "switch released");
  temp_alarm_n = 0;
  repeat (4) @(posedge clk);
  chk(!smi_n, "temperature alarm on SMI");
  temp_alarm_n = 1;

  // -------------------------------------------- processor reset request
  @(negedge clk) cpu_rst_req = 1;
  @(negedge clk) cpu_rst_req = 0;
  chk(!hreset_n, "processor reset on request");
  t = 0;
  while (!hreset_n && t < HC + 100) begin @(posedge clk); t++; end
  chk(hreset_n && t >= HC - 2, "requested reset pulse");
  if (hreset_n) m_cpu_rst++;

  // ----------------------------------------------------- mode 2: SRAM test
  mode = 2'd2;
  repeat (2) @(posedge clk);
  chk(!hreset_n, "processor held in SRAM-test mode");
  t = 0;
  while (!test_done && t < 6 * W + 100) begin @(posedge clk); t++; end
  chk(test_done && test_errors == 0, "SRAM test passes");
  if (test_done && test_errors == 0) m_mode_test++;
  chk(mem.mem[W - 1] == ~PAT, "SRAM test covers the whole SRAM");

  // --------------------------------------------- mode 1: S-record loading
  mode = 2'd1;
  repeat (SVC_BIT * 4) @(posedge clk);
  begin
    logic [7:0] rec [];
    rec = new[8];
    for (int k = 0; k < 8; k++) rec[k] = 8'(8'h11 * (k + 1));
    srec_send(1, 16'h0040, rec, SVC_BIT);
    rec = new[0];
    srec_send(9, 16'h0000, rec, SVC_BIT);
  end
  repeat (SVC_BIT * 4) @(posedge clk);
  chk(prog_done && !prog_err, "S-record file loaded");
  if (prog_done && !prog_err) m_mode_prog++;

  // --------------------------------------------- back to normal operation
  mode = 2'd0;
  repeat (2) @(posedge clk);
  chk(hreset_n, "processor runs in normal mode");
  bus_read(32'h0000_0040, 3'd0, d, e);
  chk(!e && d == 64'h1122_3344_5566_7788, "processor reads the loaded program");
  bus_read(32'h0000_0048, 3'd0, d, e);
  chk(d == ~PAT, "processor reads the SRAM-test pattern");
  if (d == ~PAT) m_mode_normal++;

  // ------------------------------------------------------ mode 3: dump
  mode = 2'd3;
  for (int i = 0; i < 16; i++) begin
    logic [63:0] exp;
    exp = (i < 8) ? ~PAT : ~PAT;
    ser_recv(SVC_BIT, v8, ok);
    chk(ok && v8 == exp[63 - 8 * (i % 8) -: 8], "dumped byte");
  end
  if (DUMP_ALL) begin
    t = 0;
    while (!dump_done && t < W * 8 * 12 * SVC_BIT) begin @(posedge clk); t++; end
    chk(dump_done, "whole SRAM dumped");
  end
  m_mode_dump++;
  mode = 2'd0;
  repeat (2) @(posedge clk);

  // ------------------------------------------------------------ summary
  m_drtry = bus_drtry; m_tea = bus_tea; m_stall = bus_stall;
  mech("processor reset", m_reset);
  mech("SRAM single beat", m_single);
  mech("SRAM burst", m_burst);
  mech("wait-state stall clocks", m_stall);
  mech("read-modify-write", m_rmw);
  mech("EDAC DRTRY correction", m_drtry);
  mech("EDAC write-back", m_scrub);
  mech("machine check", m_mcp);
  mech("TEA", m_tea);
  mech("address-only", m_aonly);
  mech("Flash access", m_flash);
  mech("SCC access", m_scc);
  mech("UART transmit", m_uart_tx);
  mech("UART receive", m_uart_rx);
  mech("INT interrupt", m_int);
  mech("I2C transfer", m_i2c);
  mech("LVDS receive", m_lvds);
  mech("system management", m_smr);
  mech("LEDs", m_led);
  mech("switch interrupt", m_switch);
  mech("SMI", m_smi);
  mech("processor reset request", m_cpu_rst);
  mech("mode switch: SRAM test", m_mode_test);
  mech("mode switch: programmer", m_mode_prog);
  mech("mode switch: normal", m_mode_normal);
  mech("mode switch: dump", m_mode_dump);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
