// uart_tx: transmit shifter of the FPGA UARTs.
//
// On load (while idle) takes an 8- or 9-bit character and sends start bit,
// data LSB first, the ninth bit when nine is set, and one stop bit, each bit
// lasting 16 ticks of tick16 (the 16x baud clock enable). done pulses for one
// clock when the stop bit has been sent; busy is high from load to done.
// txd idles high. Frame format follows the AVR UART the design is based on.
module uart_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick16,
  input  logic       load,
  input  logic [8:0] data,
  input  logic       nine,
  output logic       busy,
  output logic       done,
  output logic       txd
);

  logic [10:0] shreg;     // stop, [bit 8], data, start
  logic [3:0]  nbits;     // bits still to send
  logic [3:0]  sub;       // 16x sub-bit counter

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '1;
      nbits <= '0;
      sub   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      txd   <= 1'b1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        txd <= 1'b1;
        if (load) begin
          shreg <= nine ? {1'b1, data[8:0], 1'b0} : {2'b11, data[7:0], 1'b0};
          nbits <= nine ? 4'd11 : 4'd10;
          sub   <= '0;
          busy  <= 1'b1;
        end
      end else if (tick16) begin
        txd <= shreg[0];
        if (sub == 4'd15) begin
          sub   <= '0;
          shreg <= {1'b1, shreg[10:1]};
          nbits <= nbits - 4'd1;
          if (nbits == 4'd1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          sub <= sub + 4'd1;
        end
      end
    end
  end

endmodule
