// tb_sram_dump: self-checking test of the SRAM dump engine. A small SRAM is
// filled with random words; the bench decodes the 8N1 stream on txd at the
// programmed baud rate and checks every byte (eight per word, byte lane 0
// first), the stop bits, the byte count and done.
module tb_sram_dump;
  import obc_pkg::*;
  localparam int W = 8;
  localparam int UB = 3;
  localparam int BIT = 16 * (UB + 1);
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  logic [17:0] a;
  logic cs_n, oe_n, txd, done;
  logic [63:0] d;
  logic [15:0] c;
  logic [31:0] bytes_sent;

  sram_dump #(.WORDS(W), .UBRR(8'(UB))) dut (
    .clk, .rst, .sram_a(a), .sram_cs_n(cs_n), .sram_oe_n(oe_n), .sram_d_i(d),
    .txd, .done, .bytes_sent);
  sram_model #(.WORDS(W)) mem (
    .clk, .a, .cs_n, .oe_n, .bwe_n(8'hFF), .d_i(64'd0), .d_o(d),
    .cwe_n(1'b1), .c_i(16'd0), .c_o(c));

  always #5 clk = !clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int t;
    for (int i = 0; i < W; i++) mem.mem[i] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < W * 8; i++) begin
      t = 0;
      while (txd && t < 40 * BIT) begin @(posedge clk); t++; end
      chk(!txd, "start bit");
      repeat (BIT + BIT / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin b[k] = txd; repeat (BIT) @(posedge clk); end
      chk(txd, "stop bit");
      chk(b == mem.mem[i / 8][63 - 8 * (i % 8) -: 8], "dumped byte");
    end
    repeat (2 * BIT) @(posedge clk);
    chk(done, "done");
    chk(bytes_sent == W * 8, "byte count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
