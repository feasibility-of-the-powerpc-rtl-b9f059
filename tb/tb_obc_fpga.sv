// tb_obc_fpga: end-to-end test of the support FPGA with reduced sizes (small
// SRAM, short reset and debounce times, fast service-mode baud rate) so the
// whole dump can be checked. The environment and test sequence are in
// obc_fpga_env.svh.
module tb_obc_fpga;
  localparam int W = 512;
  localparam int HC = 64;
  localparam int DB = 40;
  localparam int SVC_UB = 1;
  localparam int SVC_BIT = 16 * (SVC_UB + 1);
  localparam int CPU_UBRR = 3;
  localparam int I2C_PRE = 3;
  localparam bit DUMP_ALL = 1;

  `include "obc_fpga_env.svh"

  initial begin
    #100000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  obc_fpga #(
    .HRESET_CYCLES(HC), .DEBOUNCE(DB), .SRAM_WORDS(W), .SVC_UBRR(8'(SVC_UB))
  ) dut (.*);
endmodule
