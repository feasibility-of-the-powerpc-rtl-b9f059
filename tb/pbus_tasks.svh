// pbus_tasks.svh: register-bus tasks shared by the register-block testbenches.
// Included inside a testbench module that declares clk, sel, req (pbus_req_t)
// and rdata. pb_write gives a one-clock write strobe with an 8/16/32-bit value
// placed MSB-aligned on D(0-31); pb_read samples rdata during a one-clock read
// strobe.
task automatic pb_write(input logic [3:0] off, input logic [31:0] val, input int bits = 8);
  @(negedge clk);
  sel = 1; req.wr = 1; req.rd = 0; req.off = off;
  req.wdata = val << (32 - bits);
  @(negedge clk);
  sel = 0; req.wr = 0;
endtask

task automatic pb_read(input logic [3:0] off, output logic [31:0] val, input int bits = 8);
  @(negedge clk);
  sel = 1; req.rd = 1; req.wr = 0; req.off = off;
  #1 val = rdata >> (32 - bits);
  @(negedge clk);
  sel = 0; req.rd = 0;
endtask
