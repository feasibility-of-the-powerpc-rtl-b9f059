// uart: one of the two FPGA UARTs, modelled on the AT90S8515 AVR UART.
//
// Registers (offset = address bits A(24-27); big-endian bit 0 = value 8'h80):
//   0x9 UBRR  R/W  baud divisor; 16x baud = f_clk / (UBRR + 1)
//   0xA UCR   R/W  RXCIE TXCIE UDRIE RXEN TXEN CHR9 RXB8(R) TXB8(W); reset 8'h02
//   0xB USR   R    RXC TXC UDRE FE OR 0 0 0;                        reset 8'h20
//   0xC UDR   W: character to send, R: character received
// A write to UDR fills the data register (UDRE clears, TXC clears); the
// data register moves to the shifter as soon as the shifter is free, setting
// UDRE again. TXC is set when the shifter finishes and nothing is waiting.
// A received character sets RXC and is held in UDR with its ninth bit in RXB8;
// FE is the frame error of that character; OR is set when a character arrives
// while RXC is still set (the old character is kept). Reading UDR clears RXC.
// irq_rxc/irq_txc/irq_udre are the flag ANDed with its enable in UCR.
//
// Registers, bits, reset values, the baud formula, 8/9-bit characters, voting
// and FE/OR follow the document. How TXC and OR are cleared is this design's
// choice (the document gives no clearing rule; TXC is cleared by the next
// UDR write, OR by a UDR read). Register access: one-cycle pb_req strobes,
// rdata combinational on D(0-7) (rdata[31:24]).
//
// Bit 1 of a value written to UCR (RXB8) is dropped, since RXB8 is read-only.
module uart
  import obc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,
  input  pbus_req_t   req,
  output logic [31:0] rdata,
  input  logic        rxd,
  output logic        txd,
  output logic        irq_rxc,
  output logic        irq_txc,
  output logic        irq_udre
);

  logic [7:0] ubrr, ucr_w;   // ucr_w holds the writable bits (all but RXB8)
  logic       rxc, txc, udre, fe, ovr;
  logic [8:0] tx_dr, rx_dr;
  logic [7:0] div;
  logic       tick16;
  logic       tx_busy, tx_done, tx_load;
  logic       rx_valid, rx_fe;
  logic [8:0] rx_data;
  logic       wr, rd;
  logic [7:0] ucr, usr;

  assign wr = sel && req.wr;
  assign rd = sel && req.rd;

  // 16x baud clock enable
  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0;
    end else if (div >= ubrr) begin
      div <= '0;
    end else begin
      div <= div + 8'd1;
    end
  end
  assign tick16 = (div >= ubrr);

  assign tx_load = !udre && !tx_busy && ucr_w[3];

  uart_tx u_tx (
    .clk, .rst, .tick16, .load(tx_load), .data(tx_dr), .nine(ucr_w[2]),
    .busy(tx_busy), .done(tx_done), .txd
  );

  uart_rx u_rx (
    .clk, .rst, .tick16, .en(ucr_w[4]), .nine(ucr_w[2]), .rxd,
    .valid(rx_valid), .data(rx_data), .frame_err(rx_fe)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ubrr  <= '0;
      ucr_w <= 8'h00;
      rxc   <= 1'b0;
      txc   <= 1'b0;
      udre  <= 1'b1;
      fe    <= 1'b0;
      ovr   <= 1'b0;
      tx_dr <= '0;
      rx_dr <= 9'h100;
    end else begin
      if (tx_load) udre <= 1'b1;
      if (tx_done && udre && !tx_load) txc <= 1'b1;
      if (rd && req.off == 4'hC) begin
        rxc <= 1'b0;
        ovr <= 1'b0;
      end
      if (rx_valid) begin
        if (rxc && !(rd && req.off == 4'hC)) begin
          ovr <= 1'b1;
        end else begin
          rxc   <= 1'b1;
          rx_dr <= rx_data;
          fe    <= rx_fe;
        end
      end
      if (wr) begin
        unique case (req.off)
          4'h9: ubrr <= req.wdata[31:24];
          4'hA: ucr_w <= req.wdata[31:24];
          4'hC: begin
            tx_dr <= {ucr_w[0], req.wdata[31:24]};
            udre  <= 1'b0;
            txc   <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    ucr = {ucr_w[7:2], rx_dr[8], 1'b0};
    usr = {rxc, txc, udre, fe, ovr, 3'b000};
    unique case (req.off)
      4'h9:    rdata = {ubrr, 24'd0};
      4'hA:    rdata = {ucr, 24'd0};
      4'hB:    rdata = {usr, 24'd0};
      4'hC:    rdata = {rx_dr[7:0], 24'd0};
      default: rdata = '0;
    endcase
  end

  assign irq_rxc  = rxc  && ucr_w[7];
  assign irq_txc  = txc  && ucr_w[6];
  assign irq_udre = udre && ucr_w[5];

endmodule
