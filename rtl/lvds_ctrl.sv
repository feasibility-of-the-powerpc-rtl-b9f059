// lvds_ctrl: register interface to the Bus-LVDS serialiser/deserialiser pair.
//
// The 16-bit location 0x3000_0000 carries the 10-bit LVDS word in its low ten
// bits (the six upper bits read as zero and are ignored on writes).
//   0x0 TXR W  word for the serialiser (held on ser_din)    RXR R  last received word
//   0x1 CTRL R/W  bit 0 Tx enable (ser_den), bit 1 Rx enable (des_ren),
//                 bit 7 synchronisation (ser_sync, write-only, reads 0)
//   0x2 STATUS R  bit 7 lock (deserialiser LOCK, active low on the pin)
// Received words are taken on each rising edge of the deserialiser's
// recovered clock des_rclk (synchronised to the bus clock; the data is stable
// around that edge) while Rx is enabled. A new word raises irq until RXR is
// read. Register map and bits follow the document; the capture on the
// recovered clock and the interrupt condition are this design's (the document
// lists an LVDS interrupt without saying what raises it).
module lvds_ctrl
  import obc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,
  input  pbus_req_t   req,
  output logic [31:0] rdata,
  output logic        irq,
  output logic [9:0]  ser_din,
  output logic        ser_den,
  output logic        ser_sync,
  input  logic [9:0]  des_rout,
  input  logic        des_rclk,
  input  logic        des_lock_n,
  output logic        des_ren
);

  logic [9:0] rxr;
  logic [2:0] rclk_s;
  logic [1:0] lock_s;
  logic       newword;

  always_ff @(posedge clk) begin
    if (rst) begin
      ser_din <= '0; ser_den <= 1'b0; ser_sync <= 1'b0; des_ren <= 1'b0;
      rxr <= '0; rclk_s <= '0; lock_s <= '0; newword <= 1'b0;
    end else begin
      rclk_s <= {rclk_s[1:0], des_rclk};
      lock_s <= {lock_s[0], !des_lock_n};
      if (sel && req.rd && req.off == 4'h0) newword <= 1'b0;
      if (des_ren && rclk_s[1] && !rclk_s[2]) begin
        rxr     <= des_rout;
        newword <= 1'b1;
      end
      if (sel && req.wr) begin
        unique case (req.off)
          4'h0: ser_din <= req.wdata[25:16];
          4'h1: begin
            ser_den  <= req.wdata[31];
            des_ren  <= req.wdata[30];
            ser_sync <= req.wdata[24];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (req.off)
      4'h0:    rdata = {6'd0, rxr, 16'd0};
      4'h1:    rdata = {ser_den, des_ren, 6'd0, 24'd0};
      4'h2:    rdata = {7'd0, lock_s[1], 24'd0};
      default: rdata = '0;
    endcase
  end

  assign irq = newword;

endmodule
