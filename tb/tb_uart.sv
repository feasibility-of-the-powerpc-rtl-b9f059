// tb_uart: self-checking test of the UART register block.
//
// Checks the reset values of UCR and USR, transmission of 8-bit and 9-bit
// characters (decoded from txd by the bench at the programmed baud rate),
// the UDRE/TXC flags and interrupts, reception with RXC and its interrupt,
// rejection of a one-sample noise spike by the three-sample vote, framing
// error, overrun, the ninth received bit in UCR, and random characters in
// both directions. Bit time is 16 x (UBRR + 1) clocks.
module tb_uart;
  import obc_pkg::*;
  logic clk = 0, rst = 1, sel = 0;
  pbus_req_t req = '0;
  logic [31:0] rdata;
  logic rxd = 1, txd, irq_rxc, irq_txc, irq_udre;
  int checks = 0, failures = 0;
  localparam int UBRR = 15;
  localparam int BIT = 16 * (UBRR + 1);

  uart dut (.*);

  always #5 clk = !clk;

  `include "pbus_tasks.svh"

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #50000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // drive one character on rxd; glitch_bit >= 0 puts a short low spike in the
  // middle of that data bit (which must be 1)
  task automatic send(input logic [8:0] d, input int nbits, input logic stop, input int glitch_bit = -1);
    rxd = 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < nbits; i++) begin
      rxd = d[i];
      if (i == glitch_bit) begin
        repeat (BIT / 2 - 4) @(posedge clk);
        rxd = 0; repeat (8) @(posedge clk); rxd = d[i];
        repeat (BIT / 2 - 4) @(posedge clk);
      end else repeat (BIT) @(posedge clk);
    end
    rxd = stop; repeat (BIT) @(posedge clk);
    rxd = 1; repeat (BIT) @(posedge clk);
  endtask

  // decode one character from txd
  task automatic recv(input int nbits, output logic [8:0] d, output logic stop);
    int t;
    d = '0;
    t = 0;
    while (txd && t < 40 * BIT) begin @(posedge clk); t++; end
    repeat (BIT + BIT / 2) @(posedge clk);
    for (int i = 0; i < nbits; i++) begin d[i] = txd; repeat (BIT) @(posedge clk); end
    stop = txd;
  endtask

  logic [31:0] v;
  logic [8:0] d;
  logic stop;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    pb_read(4'hA, v); chk(v == 32'h02, "UCR reset 0x02");
    pb_read(4'hB, v); chk(v == 32'h20, "USR reset 0x20 (UDRE)");
    chk(!irq_udre && !irq_rxc && !irq_txc, "no interrupts after reset");
    pb_write(4'h9, UBRR);
    pb_read(4'h9, v); chk(v == UBRR, "UBRR read back");
    pb_write(4'hA, 8'hF8);   // RXCIE TXCIE UDRIE RXEN TXEN
    #1 chk(irq_udre, "UDRE interrupt when empty");
    // transmit
    pb_write(4'hC, 8'hA5);
    pb_read(4'hB, v); chk(!v[6], "TXC clear after UDR write");
    fork recv(8, d, stop); join
    chk(d[7:0] == 8'hA5 && stop, "transmit 0xA5");
    repeat (BIT) @(posedge clk);
    pb_read(4'hB, v); chk(v[6] && v[5], "TXC and UDRE after transmit");
    chk(irq_txc, "TXC interrupt");
    // receive
    send(9'h03C, 8, 1);
    pb_read(4'hB, v); chk(v[7] && !v[4] && !v[3], "RXC set, no FE/OR");
    chk(irq_rxc, "RXC interrupt");
    pb_read(4'hC, v); chk(v == 32'h3C, "received 0x3C");
    pb_read(4'hB, v); chk(!v[7], "RXC cleared by UDR read");
    // noise spike in a 1 bit
    send(9'h0FF, 8, 1, 3);
    pb_read(4'hC, v); chk(v == 32'hFF, "spike rejected by vote");
    // framing error
    send(9'h055, 8, 0);
    pb_read(4'hB, v); chk(v[4], "framing error");
    pb_read(4'hC, v); chk(v == 32'h55, "data with framing error");
    // overrun
    send(9'h011, 8, 1);
    send(9'h022, 8, 1);
    pb_read(4'hB, v); chk(v[3], "overrun");
    pb_read(4'hC, v); chk(v == 32'h11, "first character kept on overrun");
    pb_read(4'hB, v); chk(!v[3] && !v[7], "overrun cleared by read");
    // nine-bit mode: CHR9 and TXB8
    pb_write(4'hA, 8'h1D);   // RXEN TXEN CHR9 TXB8
    pb_write(4'hC, 8'h81);
    recv(9, d, stop);
    chk(d == 9'h181 && stop, "nine-bit transmit");
    send(9'h1C3, 9, 1);
    pb_read(4'hA, v); chk(v[1], "RXB8 set");
    pb_read(4'hC, v); chk(v == 32'hC3, "nine-bit receive low byte");
    send(9'h0C3, 9, 1);
    pb_read(4'hA, v); chk(!v[1], "RXB8 clear");
    pb_read(4'hC, v);
    // random characters, 8-bit
    pb_write(4'hA, 8'h18);
    for (int i = 0; i < 12; i++) begin
      logic [7:0] c;
      c = 8'($urandom);
      pb_write(4'hC, c);
      recv(8, d, stop);
      chk(d[7:0] == c && stop, "random transmit");
      c = 8'($urandom);
      send({1'b0, c}, 8, 1);
      pb_read(4'hC, v); chk(v[7:0] == c, "random receive");
    end
    // receiver disabled: nothing received
    pb_write(4'hA, 8'h08);
    send(9'h077, 8, 1);
    pb_read(4'hB, v); chk(!v[7], "receiver disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
