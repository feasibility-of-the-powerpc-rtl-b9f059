// debounce: switch debouncer. The synchronised input must hold a new level
// for CYCLES consecutive clocks before the output takes it. Reset output is
// 1 (switch open; the pushbuttons pull their line low when pressed).
module debounce #(
  parameter int unsigned CYCLES = 330000
) (
  input  logic clk,
  input  logic rst,
  input  logic din,
  output logic dout
);

  logic [1:0]  s;
  logic [31:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      s <= 2'b11; cnt <= '0; dout <= 1'b1;
    end else begin
      s <= {s[0], din};
      if (s[1] == dout) cnt <= '0;
      else if (cnt >= CYCLES - 1) begin
        dout <= s[1]; cnt <= '0;
      end else cnt <= cnt + 32'd1;
    end
  end

endmodule
