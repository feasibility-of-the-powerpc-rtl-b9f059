// tb_lvds_ctrl: self-checking test of the LVDS register block. Checks TXR
// driving the serialiser inputs, CTRL bits (Tx enable, Rx enable, sync) and
// their read-back, STATUS lock from the active-low LOCK pin, capture of words
// on the recovered clock only while Rx is enabled, and the interrupt raised
// by a new word and cleared by reading RXR.
module tb_lvds_ctrl;
  import obc_pkg::*;
  logic clk = 0, rst = 1, sel = 0;
  pbus_req_t req = '0;
  logic [31:0] rdata;
  logic irq, ser_den, ser_sync, des_ren;
  logic [9:0] ser_din, des_rout = 0;
  logic des_rclk = 0, des_lock_n = 1;
  int checks = 0, failures = 0;

  lvds_ctrl dut (.*);

  always #5 clk = !clk;
  `include "pbus_tasks.svh"

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic rword(input logic [9:0] w);
    des_rout = w;
    repeat (3) @(posedge clk); des_rclk = 1;
    repeat (4) @(posedge clk); des_rclk = 0;
    repeat (2) @(posedge clk);
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
    chk(!ser_den && !des_ren && !irq, "reset");
    pb_write(4'h0, 10'h2AB, 16);
    chk(ser_din == 10'h2AB, "TXR to serialiser");
    pb_write(4'h1, 8'h81);
    chk(ser_den && ser_sync && !des_ren, "Tx enable and sync");
    pb_read(4'h1, v); chk(v == 8'h80, "CTRL read, sync reads 0");
    pb_read(4'h2, v); chk(v == 0, "no lock");
    des_lock_n = 0; repeat (3) @(posedge clk);
    pb_read(4'h2, v); chk(v == 1, "lock");
    rword(10'h155);
    chk(!irq, "no capture with Rx disabled");
    pb_write(4'h1, 8'h40);
    chk(des_ren && !ser_den, "Rx enable");
    for (int i = 0; i < 20; i++) begin
      logic [9:0] w;
      w = 10'($urandom);
      rword(w);
      chk(irq, "interrupt on new word");
      pb_read(4'h0, v, 16); chk(v == w, "RXR word");
      #1 chk(!irq, "interrupt cleared by RXR read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
