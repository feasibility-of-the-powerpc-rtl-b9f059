// tb_reset_ctrl: self-checking test of the reset controller with short reset
// widths. Checks that rst_int and hreset_n assert at once with the board
// reset, the width of the internal reset and of the processor reset after
// release, that a processor reset request gives a new HRESET pulse of the
// programmed width without an internal reset, and random board-reset pulses.
module tb_reset_ctrl;
  logic clk = 0, fpga_rst_n = 0, cpu_rst_req = 0;
  logic rst_int, hreset_n, in_reset;
  int checks = 0, failures = 0;
  localparam int IC = 5, HC = 37;

  reset_ctrl #(.INT_CYCLES(IC), .HRESET_CYCLES(HC)) dut (.*);

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

  task automatic release_and_measure();
    int t_int, t_h, t;
    @(negedge clk) fpga_rst_n = 1;
    t_int = -1; t_h = -1;
    for (t = 1; t < IC + HC + 20; t++) begin
      @(negedge clk);
      if (t_int < 0 && !rst_int) t_int = t;
      if (t_h < 0 && hreset_n) t_h = t;
      if (t_h < 0) chk(in_reset, "in_reset while held");
    end
    chk(t_int >= IC && t_int <= IC + 3, "internal reset width");
    chk(t_h - t_int >= HC && t_h - t_int <= HC + 2, "processor reset width");
    chk(!in_reset, "out of reset");
  endtask

  initial begin
    repeat (4) @(negedge clk);
    chk(rst_int && !hreset_n && in_reset, "held in reset");
    release_and_measure();
    // processor reset request
    @(negedge clk) cpu_rst_req = 1;
    @(negedge clk) cpu_rst_req = 0;
    begin
      int w; w = 0;
      while (!hreset_n && w < HC + 10) begin
        chk(!rst_int, "no internal reset on request");
        @(negedge clk); w++;
      end
      chk(w >= HC - 1 && w <= HC + 2, "requested pulse width");
    end
    // asynchronous assertion
    for (int i = 0; i < 10; i++) begin
      #($urandom % 10 + 1) fpga_rst_n = 0;
      #1 chk(rst_int && !hreset_n, "immediate assertion");
      repeat ($urandom % 5 + 1) @(negedge clk);
      release_and_measure();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
