// tb_i2c_master: self-checking test of the I2C master against a behavioural
// slave with an auto-incrementing register pointer (a real-time clock).
//
// Checks the prescale registers (reset 0xFFFF) and the SCL period of
// 5 x (prescale + 1) clocks, a write transaction (address, pointer, two data
// bytes, stop) with the slave's acknowledges, the read flow used for the
// clock chip (address and pointer write, repeated start, address with read
// bit, bytes read with acknowledge and a last byte without, stop), a
// no-acknowledge from a wrong address, TIP/IF/Busy status bits, and the
// interrupt raised with IEN and cleared by IACK. Random data is written and
// read back.
module tb_i2c_master;
  import obc_pkg::*;
  logic clk = 0, rst = 1, sel = 0;
  pbus_req_t req = '0;
  logic [31:0] rdata;
  logic irq, scl_oe, sda_oe, s_sda_oe;
  wire scl = !scl_oe;
  wire sda = !(sda_oe || s_sda_oe);
  int checks = 0, failures = 0;
  localparam int PRE = 3;

  i2c_master dut (.clk, .rst, .sel, .req, .rdata, .irq, .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe);
  i2c_slave_model #(.ADDR(7'h68)) u_rtc (.scl, .sda, .sda_oe(s_sda_oe));

  always #5 clk = !clk;
  `include "pbus_tasks.svh"

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // issue a command and wait for it to finish; returns SR
  task automatic cmd(input logic [7:0] c, output logic [7:0] sr);
    logic [31:0] v;
    int n;
    pb_write(4'h4, c);
    pb_read(4'h4, v);
    chk(v[1], "TIP while running");
    n = 0;
    do begin pb_read(4'h4, v); n++; end while (v[1] && n < 2000);
    chk(v[0], "IF at end of command");
    sr = v[7:0];
    chk(irq, "interrupt with IEN");
    pb_write(4'h4, 8'h01);   // IACK
    #1 chk(!irq, "IACK clears interrupt");
  endtask

  // SCL period measurement
  int last_rise = -1, period = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge scl) begin
    if (last_rise >= 0) period = cyc - last_rise;
    last_rise = cyc;
  end

  logic [31:0] v;
  logic [7:0] sr;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    pb_read(4'h0, v); chk(v == 8'hFF, "PRERlo reset");
    pb_read(4'h1, v); chk(v == 8'hFF, "PRERhi reset");
    pb_write(4'h0, PRE); pb_write(4'h1, 0);
    pb_read(4'h0, v); chk(v == PRE, "PRERlo write");
    pb_write(4'h2, 8'hC0);   // EN IEN
    pb_read(4'h2, v); chk(v == 8'hC0, "CTR");
    pb_read(4'h4, v); chk(v == 0, "SR idle");
    // write: address, pointer 5, 0x99, 0x77, stop
    pb_write(4'h3, 8'hD0); cmd(8'h90, sr);   // STA WR
    chk(!sr[7], "slave acknowledges its address");
    chk(sr[6], "bus busy after start");
    chk(period == 5 * (PRE + 1), "SCL period 5 x (prescale+1)");
    pb_write(4'h3, 8'h05); cmd(8'h10, sr); chk(!sr[7], "ack pointer");
    pb_write(4'h3, 8'h99); cmd(8'h10, sr); chk(!sr[7], "ack data 1");
    pb_write(4'h3, 8'h77); cmd(8'h50, sr); chk(!sr[7], "ack data 2 with stop");
    chk(!sr[6], "bus free after stop");
    chk(u_rtc.regs[5] == 8'h99 && u_rtc.regs[6] == 8'h77, "slave received data");
    // read flow: pointer 4, repeated start, read three bytes
    pb_write(4'h3, 8'hD0); cmd(8'h90, sr);
    pb_write(4'h3, 8'h04); cmd(8'h10, sr);
    pb_write(4'h3, 8'hD1); cmd(8'h90, sr); chk(!sr[7], "ack read address after repeated start");
    cmd(8'h28, sr); pb_read(4'h3, v); chk(v == u_rtc.regs[4], "read byte 1");
    cmd(8'h28, sr); pb_read(4'h3, v); chk(v == 8'h99, "read byte 2");
    cmd(8'h60, sr); pb_read(4'h3, v); chk(v == 8'h77, "last byte, no ack, stop");
    chk(!sr[6], "bus free");
    // wrong address
    pb_write(4'h3, 8'hA0); cmd(8'h90, sr); chk(sr[7], "no acknowledge from absent device");
    cmd(8'h40, sr);
    chk(u_rtc.starts >= 4 && u_rtc.stops >= 3, "slave saw starts and stops");
    // random write then read back
    for (int i = 0; i < 6; i++) begin
      logic [3:0] p; logic [7:0] d;
      p = 4'($urandom); d = 8'($urandom);
      pb_write(4'h3, 8'hD0); cmd(8'h90, sr);
      pb_write(4'h3, {4'h0, p}); cmd(8'h10, sr);
      pb_write(4'h3, d); cmd(8'h50, sr);
      pb_write(4'h3, 8'hD0); cmd(8'h90, sr);
      pb_write(4'h3, {4'h0, p}); cmd(8'h10, sr);
      pb_write(4'h3, 8'hD1); cmd(8'h90, sr);
      cmd(8'h60, sr); pb_read(4'h3, v);
      chk(v == d, "random write/read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
