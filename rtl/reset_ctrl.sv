// reset_ctrl: reset controller of the support FPGA.
//
// Makes two resets from the board reset line fpga_rst_n (the supply monitor's
// output, also asserted while the FPGA configures): rst_int, the reset of the
// FPGA's own logic, and hreset_n, the 603e's hard reset. fpga_rst_n is
// synchronised (asserted at once, released through two flip-flops). rst_int
// stays high for INT_CYCLES clocks after the release; hreset_n stays low for a
// further HRESET_CYCLES clocks, the programmable width of the processor reset
// pulse. A one-clock cpu_rst_req (for instance from a fatal-error handler or
// a clock/PLL change) gives a new hreset_n pulse of HRESET_CYCLES clocks
// without resetting the FPGA. in_reset is high while the processor is held.
// That the controller resets the internal logic after configuration and gives
// the processor a pulse of programmable width follows the document; the
// widths (a parameter, since no register for them is described) and the
// request input are this design's.
module reset_ctrl #(
  parameter int unsigned INT_CYCLES    = 16,
  parameter int unsigned HRESET_CYCLES = 1024
) (
  input  logic clk,
  input  logic fpga_rst_n,
  input  logic cpu_rst_req,
  output logic rst_int,
  output logic hreset_n,
  output logic in_reset
);

  logic [1:0]  s;
  logic [31:0] icnt, hcnt;

  always_ff @(posedge clk or negedge fpga_rst_n) begin
    if (!fpga_rst_n) s <= 2'b00;
    else             s <= {s[0], 1'b1};
  end

  always_ff @(posedge clk or negedge fpga_rst_n) begin
    if (!fpga_rst_n) begin
      icnt     <= '0;
      hcnt     <= '0;
      rst_int  <= 1'b1;
      hreset_n <= 1'b0;
    end else if (!s[1]) begin
      icnt     <= '0;
      hcnt     <= '0;
      rst_int  <= 1'b1;
      hreset_n <= 1'b0;
    end else if (rst_int) begin
      if (icnt >= INT_CYCLES - 1) rst_int <= 1'b0;
      else icnt <= icnt + 32'd1;
      hcnt     <= '0;
      hreset_n <= 1'b0;
    end else if (cpu_rst_req) begin
      hcnt     <= '0;
      hreset_n <= 1'b0;
    end else if (!hreset_n) begin
      if (hcnt >= HRESET_CYCLES - 1) hreset_n <= 1'b1;
      else hcnt <= hcnt + 32'd1;
    end
  end

  assign in_reset = !hreset_n;

endmodule
