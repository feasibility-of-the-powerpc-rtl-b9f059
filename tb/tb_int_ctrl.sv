// tb_int_ctrl: self-checking test of the interrupt controller. Checks INT_MSK
// write/read (bit 1 always reads 0), that INT_REG shows each source only while
// it is enabled, that INT needs GIE and a pending source, the two-clock
// synchroniser delay, SMI from the temperature alarm, and the MCP pulse width
// on an uncorrectable-error request. Random source/mask patterns are compared
// with a reference.
module tb_int_ctrl;
  import obc_pkg::*;
  logic clk = 0, rst = 1, sel = 0;
  pbus_req_t req = '0;
  logic [31:0] rdata;
  logic [29:0] src = '0;
  logic temp_alarm = 0, mcp_req = 0;
  logic int_n, smi_n, mcp_n;
  int checks = 0, failures = 0;

  int_ctrl dut (.*);

  always #5 clk = !clk;
  `include "pbus_tasks.svh"

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  logic [31:0] v;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    pb_read(4'h1, v, 32); chk(v == 0, "mask reset");
    chk(int_n && smi_n && mcp_n, "outputs idle");
    // one source, UART1 RXC (bit 23 -> src[8])
    src[8] = 1;
    repeat (3) @(posedge clk);
    pb_read(4'h0, v, 32); chk(v == 0, "masked source not pending");
    chk(int_n, "no INT while masked");
    pb_write(4'h1, 32'h0000_0100, 32);   // enable bit 23 only, GIE off
    pb_read(4'h0, v, 32); chk(v == 32'h0000_0100, "enabled source pending");
    chk(int_n, "no INT without GIE");
    pb_write(4'h1, 32'hC000_0100, 32);   // GIE plus bit 1, which is reserved
    pb_read(4'h1, v, 32); chk(v == 32'h8000_0100, "GIE set, bit 1 reserved");
    #1 chk(!int_n, "INT with GIE and pending source");
    @(negedge clk) src[8] = 0;
    @(posedge clk); #1 chk(!int_n, "synchroniser delay 1");
    @(posedge clk); #1 chk(int_n, "INT released after two clocks");
    // SMI
    temp_alarm = 1;
    repeat (2) @(posedge clk); #1 chk(!smi_n, "SMI from temperature alarm");
    temp_alarm = 0;
    repeat (2) @(posedge clk); #1 chk(smi_n, "SMI released");
    // MCP pulse
    @(negedge clk) mcp_req = 1;
    @(negedge clk) mcp_req = 0;
    chk(!mcp_n, "MCP asserted");
    @(negedge clk) chk(!mcp_n, "MCP two clocks");
    @(negedge clk) chk(mcp_n, "MCP released");
    // random
    for (int i = 0; i < 200; i++) begin
      logic [31:0] m; logic [29:0] s;
      m = $urandom; s = 30'($urandom);
      pb_write(4'h1, m, 32);
      @(negedge clk) src = s;
      repeat (3) @(posedge clk);
      pb_read(4'h0, v, 32);
      chk(v == {2'b00, s & m[29:0]}, "random pending");
      chk(int_n == !(m[31] && |(s & m[29:0])), "random INT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
