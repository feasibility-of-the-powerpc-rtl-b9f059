// i2c_master: single-master I2C controller of the support FPGA.
//
// Register blocks as in the document's controller: prescale register and
// clock generator, command and status registers, byte command controller,
// transmit/receive shift register and the bit command controller
// (i2c_bit_ctrl). Registers (offset = A(24-27); bit 0 = value 8'h80):
//   0x0 PRERlo R/W, 0x1 PRERhi R/W  prescale = f_clk/(5 f_SCL) - 1
//   0x2 CTR    R/W  EN IEN
//   0x3 TXR W / RXR R
//   0x4 CR  W  STA STO RD WR ACK - - IACK;  SR R  RxAck Busy - - - - TIP IF
// A command write with STA, WR, RD or STO set runs, in this order: a (repeated)
// start; eight bits of TXR out MSB first then the slave's acknowledge into
// RxAck (1 = no acknowledge); or eight bits in to RXR then the acknowledge
// bit (CR.ACK = 1 sends an acknowledge, SDA low, as the document's table
// states); then a stop. TIP is high meanwhile; at the end IF is set and,
// with IEN, irq is raised until IACK. PRER resets to 16'hFFFF (slowest clock),
// the other registers to zero.
//
// Registers, bit positions, the prescale formula and byte/bit control follow
// the document. The phase timing of the bit controller and the order of the
// command steps are this design's.
//
// The register bus read strobe (req.rd) is not used: reads here have no side effects.
module i2c_master
  import obc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,
  input  pbus_req_t   req,
  output logic [31:0] rdata,
  output logic        irq,
  input  logic        scl_i,
  input  logic        sda_i,
  output logic        scl_oe,
  output logic        sda_oe
);

  typedef enum logic [2:0] {B_IDLE, B_START, B_DATA, B_ACK, B_STOP, B_DONE} bstate_e;

  logic [15:0] prer, pcnt;
  logic [7:0]  ctr, txr, rxr, sh;
  logic        c_sta, c_sto, c_rd, c_wr, c_ack;
  logic        rxack, tip, iflag;
  logic        tick;
  bstate_e     bst;
  logic [2:0]  bitn;
  logic [1:0]  bcmd;
  logic        bgo, bdin, bdout, bdone, bbusy, bus_busy;
  logic        wr, en;

  assign wr = sel && req.wr;
  assign en = ctr[7];

  // clock generator: one tick every prer+1 clocks
  always_ff @(posedge clk) begin
    if (rst || !en) pcnt <= '0;
    else if (pcnt >= prer) pcnt <= '0;
    else pcnt <= pcnt + 16'd1;
  end
  assign tick = en && (pcnt >= prer);

  i2c_bit_ctrl u_bit (
    .clk, .rst, .ena(en), .tick, .cmd(bcmd), .go(bgo), .din(bdin), .dout(bdout),
    .done(bdone), .cmd_busy(bbusy), .bus_busy, .scl_i, .sda_i, .scl_oe, .sda_oe
  );

  // byte command controller
  always_ff @(posedge clk) begin
    if (rst) begin
      prer <= 16'hFFFF; ctr <= '0; txr <= '0; rxr <= '0; sh <= '0;
      c_sta <= 1'b0; c_sto <= 1'b0; c_rd <= 1'b0; c_wr <= 1'b0; c_ack <= 1'b0;
      rxack <= 1'b0; tip <= 1'b0; iflag <= 1'b0;
      bst <= B_IDLE; bitn <= '0; bcmd <= '0; bgo <= 1'b0; bdin <= 1'b1;
    end else begin
      bgo <= 1'b0;
      if (wr) begin
        unique case (req.off)
          4'h0: prer[7:0]  <= req.wdata[31:24];
          4'h1: prer[15:8] <= req.wdata[31:24];
          4'h2: ctr        <= {req.wdata[31:30], 6'd0};
          4'h3: txr        <= req.wdata[31:24];
          4'h4: begin
            if (req.wdata[24]) iflag <= 1'b0;                 // IACK
            if (en && bst == B_IDLE && |req.wdata[31:28]) begin
              c_sta <= req.wdata[31]; c_sto <= req.wdata[30];
              c_rd  <= req.wdata[29]; c_wr  <= req.wdata[28];
              c_ack <= req.wdata[27];
              tip   <= 1'b1;
              bst   <= B_START;
            end
          end
          default: ;
        endcase
      end
      if (!en) begin
        bst <= B_IDLE; tip <= 1'b0;
      end else if (!bbusy && !bgo) begin
        unique case (bst)
          B_IDLE: ;
          B_START: begin
            if (c_sta) begin
              c_sta <= 1'b0; bcmd <= 2'd0; bgo <= 1'b1;
            end else if (c_wr || c_rd) begin
              bst <= B_DATA; bitn <= 3'd7; sh <= txr;
            end else begin
              bst <= B_STOP;
            end
          end
          B_DATA: begin
            // issue bit 'bitn'; result of the previous read is collected on bdone
            bcmd <= c_wr ? 2'd2 : 2'd3;
            bdin <= sh[7];
            bgo  <= 1'b1;
            bst  <= B_ACK;            // B_ACK waits for this bit to finish
          end
          B_ACK: begin
            if (bitn != 3'd7 || c_wr || c_rd) begin
              // handled in bdone branch below
            end
          end
          B_STOP: begin
            if (c_sto) begin
              c_sto <= 1'b0; bcmd <= 2'd1; bgo <= 1'b1;
            end else begin
              bst <= B_DONE;
            end
          end
          B_DONE: begin
            tip <= 1'b0; iflag <= 1'b1; bst <= B_IDLE;
          end
          default: bst <= B_IDLE;
        endcase
      end
      // bit finished
      if (bdone && bst == B_ACK) begin
        if (c_wr || c_rd) begin
          sh <= {sh[6:0], bdout};
          if (bitn == 3'd0) begin
            if (c_rd) rxr <= {sh[6:0], bdout};
            // acknowledge bit
            bcmd <= c_wr ? 2'd3 : 2'd2;
            bdin <= c_wr ? 1'b1 : !c_ack;
            bgo  <= 1'b1;
            c_wr <= 1'b0; c_rd <= 1'b0;
          end else begin
            bitn <= bitn - 3'd1;
            bst  <= B_DATA;
          end
        end else begin
          // acknowledge bit finished
          if (bcmd == 2'd3) rxack <= bdout;
          bst <= B_STOP;
        end
      end
    end
  end

  always_comb begin
    unique case (req.off)
      4'h0:    rdata = {prer[7:0], 24'd0};
      4'h1:    rdata = {prer[15:8], 24'd0};
      4'h2:    rdata = {ctr, 24'd0};
      4'h3:    rdata = {rxr, 24'd0};
      4'h4:    rdata = {rxack, bus_busy, 4'd0, tip, iflag, 24'd0};
      default: rdata = '0;
    endcase
  end

  assign irq = iflag && ctr[6];

endmodule
