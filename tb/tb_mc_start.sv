// tb_mc_start: self-checking test of start detection. Random transfers are
// started with TS; the test checks that the address, TT, TSIZ and burst are
// latched, that new_cyc and ADSC pulse for exactly one clock, that a second TS
// during an active cycle is ignored, that the cycle stays active until AACK,
// and the decoding of write and address-only transfers from TT.
module tb_mc_start;
  import obc_pkg::*;
  logic clk = 0, rst = 1;
  logic ts_n = 1, tbst_n = 1, aack_n = 1;
  logic [31:0] a = 0;
  logic [4:0] tt = 0;
  logic [2:0] tsiz = 0;
  xfer_t xfer;
  logic cyc_active, new_cyc, write, adsc_n;
  int checks = 0, failures = 0;

  mc_start dut (.*);

  always #5 clk = !clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chk(!cyc_active && !new_cyc && adsc_n, "idle after reset");
    for (int i = 0; i < 200; i++) begin
      logic [31:0] ea; logic [4:0] ett; logic [2:0] es; logic eb;
      int wait_c;
      ea = $urandom; ett = 5'($urandom); es = 3'($urandom); eb = $urandom % 2;
      @(negedge clk);
      ts_n = 0; a = ea; tt = ett; tsiz = es; tbst_n = !eb;
      @(negedge clk);
      ts_n = 1; a = $urandom; tt = 5'($urandom);
      chk(cyc_active && new_cyc && !adsc_n, "start pulse");
      chk(xfer.addr == ea && xfer.tt == ett && xfer.tsiz == es && xfer.burst == eb, "latch");
      chk(write == (ett[1] && !ett[3]), "write decode");
      chk(xfer.addr_only == !ett[1], "address-only decode");
      // a second TS while active must be ignored
      ts_n = 0;
      @(negedge clk);
      ts_n = 1;
      chk(!new_cyc && adsc_n, "pulse one clock");
      chk(xfer.addr == ea, "hold during cycle");
      wait_c = $urandom % 5;
      repeat (wait_c) begin
        @(negedge clk);
        chk(cyc_active, "active until AACK");
      end
      aack_n = 0;
      @(negedge clk);
      aack_n = 1;
      chk(!cyc_active, "ends on AACK");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
