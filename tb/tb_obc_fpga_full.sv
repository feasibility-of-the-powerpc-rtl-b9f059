// tb_obc_fpga_full: end-to-end test of the support FPGA at its real sizes:
// default parameters (2 MB SRAM of 262144 words, 1024-clock processor reset,
// 330000-clock switch debounce, service-mode UART at UBRR 0x30) and the
// processor UART at UBRR 0x30, 38.4 kbit/s at the document's 30 MHz example, and
// the I2C prescale 0x3C of the same example (SCL period 305 clocks).
// The SRAM test covers the full SRAM; the dump is checked for its first
// bytes only. The environment and test sequence are in obc_fpga_env.svh.
module tb_obc_fpga_full;
  localparam int W = 262144;
  localparam int HC = 1024;
  localparam int DB = 330000;
  localparam int SVC_BIT = 16 * (8'h30 + 1);
  localparam int CPU_UBRR = 8'h30;
  localparam int I2C_PRE = 8'h3C;   // 100 kHz at 30 MHz in the demo program
  localparam bit DUMP_ALL = 0;

  `include "obc_fpga_env.svh"

  initial begin
    #2000000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  obc_fpga dut (.*);
endmodule
