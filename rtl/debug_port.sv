// debug_port: debug and expansion port, status LEDs and pushbuttons.
//
// Sixteen general-purpose pins on the expansion connector, four status LEDs
// and three debounced pushbuttons, at 0x8000_0000 (16-bit registers on
// D(0-15); big-endian bit k is value 16'h8000 >> k):
//   0x0 PORTREG R/W  pin values for output pins; reads the pins' levels
//   0x1 DIRREG  R/W  1 = input (pin released), 0 = output; reset 16'hFFFF
//   0x2 LEDREG  R/W  bits 12-15 LED 1-4, '0' = LED on; reset 16'h000F
//   0x3 SWREG   R    bits 13-15 switch 1-3, '1' = open; reset 16'h0007
// The connector's write-enable line exp_we_n pulses low for one clock when
// PORTREG is written. Interrupt sources: port_irq (synchronised level of each
// pin that is an input) and sw_irq (switch pressed, after debouncing).
// Register map, reset values and polarities follow the document; the
// debounce time (DEBOUNCE clocks, 5 ms at 66 MHz by default), the pin read-back
// and the interrupt levels are this design's choices.
//
// The register bus read strobe (req.rd) is not used: reads here have no side effects.
module debug_port
  import obc_pkg::*;
#(
  parameter int unsigned DEBOUNCE = 330000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,
  input  pbus_req_t   req,
  output logic [31:0] rdata,
  input  logic [15:0] port_i,
  output logic [15:0] port_o,
  output logic [15:0] port_oe,
  output logic        exp_we_n,
  output logic [3:0]  led_n,      // led_n[3] = LED 1
  input  logic [2:0]  sw_n,       // sw_n[2] = switch 1, low when pressed
  output logic [15:0] port_irq,
  output logic [2:0]  sw_irq      // sw_irq[2] = switch 1
);

  logic [15:0] portreg, dirreg, pin_s1, pin_s2, pins_rd;
  logic [3:0]  ledreg;
  logic [2:0]  sw_db;

  for (genvar i = 0; i < 3; i++) begin : g_sw
    debounce #(.CYCLES(DEBOUNCE)) u_db (.clk, .rst, .din(sw_n[i]), .dout(sw_db[i]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      portreg <= '0; dirreg <= 16'hFFFF; ledreg <= 4'hF;
      pin_s1 <= '0; pin_s2 <= '0; exp_we_n <= 1'b1;
    end else begin
      pin_s1   <= port_i;
      pin_s2   <= pin_s1;
      exp_we_n <= 1'b1;
      if (sel && req.wr) begin
        unique case (req.off)
          4'h0: begin portreg <= req.wdata[31:16]; exp_we_n <= 1'b0; end
          4'h1: dirreg <= req.wdata[31:16];
          4'h2: ledreg <= req.wdata[19:16];
          default: ;
        endcase
      end
    end
  end

  assign pins_rd = (dirreg & pin_s2) | (~dirreg & portreg);

  always_comb begin
    unique case (req.off)
      4'h0:    rdata = {pins_rd, 16'd0};
      4'h1:    rdata = {dirreg, 16'd0};
      4'h2:    rdata = {12'd0, ledreg, 16'd0};
      4'h3:    rdata = {13'd0, sw_db, 16'd0};
      default: rdata = '0;
    endcase
  end

  assign port_o   = portreg;
  assign port_oe  = ~dirreg;
  assign led_n    = ledreg;
  assign port_irq = pin_s2 & dirreg;
  assign sw_irq   = ~sw_db;

endmodule
