// tb_sram_test: self-checking test of the SRAM test engine on a small SRAM.
// One engine runs against a good memory and must finish both passes with no
// errors, leaving the inverted pattern and its check bits in every word; a
// second engine sees a memory with a stuck data bit at one address and must
// count one error per pass and report that address.
module tb_sram_test;
  import obc_pkg::*;
  localparam int W = 64;
  localparam logic [63:0] PAT = 64'hA5A5_5A5A_0FF0_C33C;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  logic [17:0] a0, a1;
  logic cs0, oe0, cwe0, cs1, oe1, cwe1, run0, run1, done0, done1;
  logic [7:0] bwe0, bwe1, pass0, pass1;
  logic [63:0] do0, di0, do1, di1, mo1;
  logic [15:0] co0, ci0, co1, ci1;
  logic [31:0] err0, err1;
  logic [17:0] fa0, fa1;

  sram_test #(.WORDS(W)) dut (
    .clk, .rst, .sram_a(a0), .sram_cs_n(cs0), .sram_oe_n(oe0), .sram_bwe_n(bwe0),
    .sram_d_o(do0), .sram_d_i(di0), .sram_c_o(co0), .sram_c_i(ci0), .sram_cwe_n(cwe0),
    .running(run0), .done(done0), .errors(err0), .fail_addr(fa0), .pass_no(pass0));
  sram_model #(.WORDS(W)) mem0 (
    .clk, .a(a0), .cs_n(cs0), .oe_n(oe0), .bwe_n(bwe0), .d_i(do0), .d_o(di0),
    .cwe_n(cwe0), .c_i(co0), .c_o(ci0));

  sram_test #(.WORDS(W)) dut_bad (
    .clk, .rst, .sram_a(a1), .sram_cs_n(cs1), .sram_oe_n(oe1), .sram_bwe_n(bwe1),
    .sram_d_o(do1), .sram_d_i(di1), .sram_c_o(co1), .sram_c_i(ci1), .sram_cwe_n(cwe1),
    .running(run1), .done(done1), .errors(err1), .fail_addr(fa1), .pass_no(pass1));
  sram_model #(.WORDS(W)) mem1 (
    .clk, .a(a1), .cs_n(cs1), .oe_n(oe1), .bwe_n(bwe1), .d_i(do1), .d_o(mo1),
    .cwe_n(cwe1), .c_i(co1), .c_o(ci1));
  // data bit 17 of word 37 reads back inverted
  assign di1 = (a1 == 18'd37) ? (mo1 ^ 64'h2_0000) : mo1;

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
    int t;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1 chk(run0 && !done0, "running");
    t = 0;
    while (!(done0 && done1) && t < 10 * W) begin @(posedge clk); t++; end
    #1;
    chk(done0 && !run0, "good memory: done");
    chk(t >= 4 * W - 2 && t <= 4 * W + 4, "one word per clock, write and read, two passes");
    chk(err0 == 0, "good memory: no errors");
    chk(pass0 == 2, "two passes");
    for (int i = 0; i < W; i++) begin
      chk(mem0.mem[i] == ~PAT, "inverted pattern left in memory");
      chk(mem0.cmem[i][7:0] == edac_encode(~PAT), "check bits written");
    end
    chk(done1, "bad memory: done");
    chk(err1 == 2, "stuck bit: one error per pass");
    chk(fa1 == 18'd37, "failing address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
