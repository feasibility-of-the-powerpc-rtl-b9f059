// int_ctrl: interrupt controller of the support FPGA.
//
// Collects thirty interrupt sources into the 603e's INT input, drives SMI
// from the temperature-sensor alarm and MCP from the EDAC unit.
// Registers (32 bits on D(0-31); big-endian bit k is vector bit 31-k):
//   0x0 INT_REG R    pending interrupts (0xC000_0000)
//   0x1 INT_MSK R/W  bit 0 GIE, bits 2-31 enables (0xC000_0010)
// Source bits (big-endian): 2-17 debug/expansion port pins 0-15, 18 temperature
// sensor, 19 LVDS, 20 RTC, 21 SCC, 22/23/24 UART1 TXC/RXC/UDRE, 25/26/27 UART2
// TXC/RXC/UDRE, 28 I2C, 29-31 pushbuttons 0-2. src[29:0] uses the same vector
// positions (src[29] = port pin 0 ... src[0] = switch 2), active high.
//
// Sources are synchronised with two flip-flops. A bit of INT_REG is set while
// its source is active and enabled; INT (int_n) is asserted while GIE is set
// and any bit of INT_REG is set. All sources are level sensitive: the handler
// clears an interrupt at its source (reading UDR, IACK in the I2C controller,
// releasing a switch). SMI (smi_n) follows the synchronised temperature alarm.
// MCP (mcp_n), which the 603e samples on its falling edge, is pulsed low for
// MCP_PULSE clocks on each EDAC uncorrectable-error request.
//
// Register layout, bit meanings, reset values and the routing of EDAC errors
// to MCP and the temperature alarm to SMI follow the document. Level
// sensitivity and the pulse length are this design's.
//
// The register bus read strobe (req.rd) is not used: reads here have no side effects.
module int_ctrl
  import obc_pkg::*;
#(
  parameter int unsigned MCP_PULSE = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,
  input  pbus_req_t   req,
  output logic [31:0] rdata,
  input  logic [29:0] src,
  input  logic        temp_alarm,
  input  logic        mcp_req,
  output logic        int_n,
  output logic        smi_n,
  output logic        mcp_n
);

  logic [31:0] msk;
  logic [29:0] s1, s2;
  logic [31:0] pend;
  logic [1:0]  t_s;
  logic [7:0]  mcp_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      msk <= '0; s1 <= '0; s2 <= '0; t_s <= '0; mcp_cnt <= '0;
    end else begin
      s1  <= src;
      s2  <= s1;
      t_s <= {t_s[0], temp_alarm};
      if (sel && req.wr && req.off == 4'h1) msk <= {req.wdata[31], 1'b0, req.wdata[29:0]};
      if (mcp_req) mcp_cnt <= 8'(MCP_PULSE);
      else if (mcp_cnt != 8'd0) mcp_cnt <= mcp_cnt - 8'd1;
    end
  end

  assign pend  = {2'b00, s2 & msk[29:0]};
  assign int_n = !(msk[31] && |pend);
  assign smi_n = !t_s[1];
  assign mcp_n = (mcp_cnt == 8'd0);

  always_comb begin
    unique case (req.off)
      4'h0:    rdata = pend;
      4'h1:    rdata = msk;
      default: rdata = '0;
    endcase
  end

endmodule
