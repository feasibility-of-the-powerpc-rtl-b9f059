// tb_sys_mgmt: self-checking test of the system management register: reset
// value 0x0058, that bits 0-8 read zero, and that each of bits 9-15 drives its
// power-control output, for random values.
module tb_sys_mgmt;
  import obc_pkg::*;
  logic clk = 0, rst = 1, sel = 0;
  pbus_req_t req = '0;
  logic [31:0] rdata;
  logic uart_rx_en, uart_shdn, lvds_den, lvds_ren, lvds_pwrdn, temp_stby, cur_shdn;
  int checks = 0, failures = 0;

  sys_mgmt dut (.*);

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
    pb_read(4'h0, v, 16); chk(v == 16'h0058, "reset value 0x0058");
    chk({uart_rx_en, uart_shdn, lvds_den, lvds_ren, lvds_pwrdn, temp_stby, cur_shdn} == 7'b1011000,
        "reset outputs: peripherals active");
    for (int i = 0; i < 100; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      pb_write(4'h0, w, 16);
      pb_read(4'h0, v, 16);
      chk(v == {9'd0, w[6:0]}, "read back bits 9-15");
      chk({uart_rx_en, uart_shdn, lvds_den, lvds_ren, lvds_pwrdn, temp_stby, cur_shdn} == w[6:0],
          "outputs follow bits 9-15");
    end
    pb_write(4'h1, 16'hFFFF, 16);
    pb_read(4'h1, v, 16); chk(v == 0, "other offsets read zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
