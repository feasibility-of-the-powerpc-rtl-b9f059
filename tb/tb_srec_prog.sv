// tb_srec_prog: self-checking test of the S-record programmer. The bench
// sends S-record text over a serial line at the programmed baud rate: a
// header record, S1/S2/S3 data records (16-, 24- and 32-bit addresses, odd
// lengths and addresses that are not word aligned), a record with a wrong
// checksum and a termination record. It then checks every byte in the SRAM,
// that the untouched bytes of partly written words kept their old value, that
// the check bits of every word match its data, the record, byte and error
// counts, the checksum-error flag and done.
module tb_srec_prog;
  import obc_pkg::*;
  localparam int W = 256;
  localparam int UB = 1;
  localparam int BIT = 16 * (UB + 1);
  logic clk = 0, rst = 1, rxd = 1;
  int checks = 0, failures = 0;
  logic [17:0] a;
  logic cs_n, oe_n, cwe_n, done, chk_err;
  logic [7:0] bwe_n;
  logic [63:0] d_o, d_i;
  logic [15:0] c_o, c_i, rec_count, byte_count, err_count;
  logic [7:0] ref_mem [W * 8];
  int nrec = 0, nbytes = 0;

  srec_prog #(.UBRR(8'(UB))) dut (
    .clk, .rst, .rxd, .sram_a(a), .sram_cs_n(cs_n), .sram_oe_n(oe_n), .sram_bwe_n(bwe_n),
    .sram_d_o(d_o), .sram_d_i(d_i), .sram_c_o(c_o), .sram_cwe_n(cwe_n), .done, .chk_err,
    .rec_count, .byte_count, .err_count);
  sram_model #(.WORDS(W)) mem (
    .clk, .a, .cs_n, .oe_n, .bwe_n, .d_i(d_o), .d_o(d_i), .cwe_n, .c_i(c_o), .c_o(c_i));

  always #5 clk = !clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic send_char(input logic [7:0] ch);
    rxd = 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = ch[i]; repeat (BIT) @(posedge clk); end
    rxd = 1; repeat (BIT) @(posedge clk);
  endtask

  function automatic logic [7:0] hexc(input logic [3:0] n);
    return (n < 10) ? 8'(8'h30 + n) : 8'(8'h37 + n);
  endfunction

  task automatic send_hex(input logic [7:0] b);
    send_char(hexc(b[7:4]));
    send_char(hexc(b[3:0]));
  endtask

  // send one record; nab address bytes; bad = corrupt the checksum
  task automatic send_rec(input int typ, input logic [31:0] addr, input int n, input logic bad);
    logic [7:0] sum, b;
    int nab;
    nab = (typ == 1 || typ == 9 || typ == 0) ? 2 : (typ == 2 || typ == 8) ? 3 : 4;
    send_char("S");
    send_char(hexc(4'(typ)));
    sum = 8'(nab + n + 1);
    send_hex(8'(nab + n + 1));
    for (int k = nab - 1; k >= 0; k--) begin
      b = addr[8 * k +: 8]; sum += b; send_hex(b);
    end
    for (int k = 0; k < n; k++) begin
      b = 8'($urandom);
      sum += b; send_hex(b);
      if (typ >= 1 && typ <= 3) begin
        if (!bad) ref_mem[(addr + k) % (W * 8)] = b;
        nbytes++;
      end
    end
    send_hex(bad ? ~sum + 8'd1 : ~sum);
    send_char(8'h0D); send_char(8'h0A);
    nrec++;
  endtask

  initial begin
    for (int i = 0; i < W * 8; i++) ref_mem[i] = 8'h00;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (BIT * 4) @(posedge clk);
    send_rec(0, 0, 3, 0);
    send_rec(1, 32'h0000_0000, 16, 0);
    send_rec(1, 32'h0000_0013, 5, 0);
    send_rec(2, 32'h0000_0103, 7, 0);
    send_rec(3, 32'h0000_0240, 9, 0);
    chk(!chk_err && err_count == 0, "no checksum error yet");
    send_rec(1, 32'h0000_0300, 4, 1);
    chk(chk_err && err_count == 1, "checksum error detected");
    send_rec(9, 0, 0, 0);
    repeat (4 * BIT) @(posedge clk);
    chk(done, "done after termination record");
    chk(rec_count == 16'(nrec), "record count");
    chk(byte_count == 16'(nbytes), "data byte count");
    for (int i = 0; i < W; i++) begin
      logic [63:0] w;
      for (int k = 0; k < 8; k++) w[63 - 8 * k -: 8] = ref_mem[8 * i + k];
      if (i * 8 < 32'h300 || i * 8 >= 32'h308) chk(mem.mem[i] == w, "SRAM contents");
      chk(mem.cmem[i][7:0] == edac_encode(mem.mem[i]), "check bits match data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
