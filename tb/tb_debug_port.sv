// tb_debug_port: self-checking test of the debug/expansion port block, with a
// short debounce time. Checks the reset values of DIRREG, LEDREG and SWREG,
// pin directions and output values, the write pulse on exp_we_n, read-back of
// the pin levels, input-pin interrupts, LED outputs (0 = on), and that switch
// bounces shorter than the debounce time are ignored while a held press is
// seen in SWREG and raises its interrupt.
module tb_debug_port;
  import obc_pkg::*;
  logic clk = 0, rst = 1, sel = 0;
  pbus_req_t req = '0;
  logic [31:0] rdata;
  logic [15:0] port_i = 16'h0000, port_o, port_oe, port_irq;
  logic exp_we_n;
  logic [3:0] led_n;
  logic [2:0] sw_n = 3'b111, sw_irq;
  int checks = 0, failures = 0;
  int we_pulses = 0;
  localparam int DB = 20;

  debug_port #(.DEBOUNCE(DB)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) if (!exp_we_n) we_pulses++;
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
    repeat (DB + 5) @(posedge clk);
    pb_read(4'h1, v, 16); chk(v == 16'hFFFF, "DIRREG reset all inputs");
    pb_read(4'h2, v, 16); chk(v == 16'h000F, "LEDREG reset, LEDs off");
    pb_read(4'h3, v, 16); chk(v == 16'h0007, "SWREG reset, switches open");
    chk(port_oe == 0 && led_n == 4'hF, "pins released, LEDs off");
    // outputs
    pb_write(4'h1, 16'h00FF, 16);
    chk(port_oe == 16'hFF00, "direction");
    pb_write(4'h0, 16'hA5C3, 16);
    chk(port_o == 16'hA5C3, "output values");
    @(negedge clk);
    chk(we_pulses == 1, "one write pulse");
    // inputs: pins 8-15 inputs (vector bits 7:0)
    port_i = 16'h3C5A;
    repeat (3) @(posedge clk);
    pb_read(4'h0, v, 16); chk(v == 16'hA55A, "input pins read, output pins give PORTREG");
    chk(port_irq == (16'h3C5A & 16'h00FF), "input-pin interrupts only for inputs");
    // LEDs
    pb_write(4'h2, 16'h0005, 16);
    chk(led_n == 4'h5, "LED outputs");
    // switch 2 (sw_n[1]): bounce then hold
    for (int i = 0; i < 5; i++) begin
      sw_n[1] = 0; repeat (DB / 4) @(posedge clk);
      sw_n[1] = 1; repeat (DB / 4) @(posedge clk);
    end
    pb_read(4'h3, v, 16); chk(v == 16'h0007 && sw_irq == 0, "bounce ignored");
    sw_n[1] = 0;
    repeat (DB + 5) @(posedge clk);
    pb_read(4'h3, v, 16); chk(v == 16'h0005, "held press seen");
    chk(sw_irq == 3'b010, "switch interrupt");
    sw_n[1] = 1;
    repeat (DB + 5) @(posedge clk);
    pb_read(4'h3, v, 16); chk(v == 16'h0007 && sw_irq == 0, "release seen");
    for (int i = 0; i < 30; i++) begin
      logic [15:0] d, o, p;
      d = 16'($urandom); o = 16'($urandom); p = 16'($urandom);
      pb_write(4'h1, d, 16);
      pb_write(4'h0, o, 16);
      port_i = p;
      repeat (3) @(posedge clk);
      chk(port_oe == ~d && port_o == o, "random outputs");
      chk(port_irq == (p & d), "random input interrupts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
