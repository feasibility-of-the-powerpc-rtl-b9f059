// uart_rx: receive shifter of the FPGA UARTs with three-sample voting.
//
// Runs on tick16, the 16x baud clock enable. A falling edge on the
// synchronised rxd starts a character; the start bit is confirmed at its
// middle. Every bit is sampled at ticks 7, 8 and 9 of its sixteen and the
// majority of the three samples is taken, which filters noise spikes shorter
// than a sample period (the voting circuit of the document). After 8 or 9
// data bits (LSB first) the stop bit is voted: valid pulses for one clock with
// the character and frame_err set when the stop bit read as '0'.
module uart_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick16,
  input  logic       en,
  input  logic       nine,
  input  logic       rxd,
  output logic       valid,
  output logic [8:0] data,
  output logic       frame_err
);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;

  rstate_e    st;
  logic [2:0] sync;
  logic [3:0] sub;
  logic [3:0] bitn;
  logic [2:0] smp;
  logic [8:0] sh;
  logic       rx, vote;

  assign rx   = sync[2];
  assign vote = (smp[0] & smp[1]) | (smp[1] & smp[2]) | (smp[0] & smp[2]);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= R_IDLE; sync <= '1; sub <= '0; bitn <= '0; smp <= '1; sh <= '0;
      valid <= 1'b0; data <= '0; frame_err <= 1'b0;
    end else begin
      sync  <= {sync[1:0], rxd};
      valid <= 1'b0;
      if (!en) begin
        st <= R_IDLE;
      end else if (tick16) begin
        if (sub == 4'd7 || sub == 4'd8 || sub == 4'd9) smp <= {smp[1:0], rx};
        unique case (st)
          R_IDLE: if (!rx) begin st <= R_START; sub <= 4'd1; end
          default: begin
            sub <= sub + 4'd1;
            if (sub == 4'd10) begin
              // the three samples of this bit are in smp
              unique case (st)
                R_START: if (vote) st <= R_IDLE; else begin st <= R_DATA; bitn <= '0; end
                R_DATA: begin
                  sh   <= nine ? {vote, sh[8:1]} : {1'b0, vote, sh[7:1]};
                  bitn <= bitn + 4'd1;
                  if (bitn == (nine ? 4'd8 : 4'd7)) st <= R_STOP;
                end
                R_STOP: begin
                  st        <= R_IDLE;
                  valid     <= 1'b1;
                  data      <= sh;
                  frame_err <= !vote;
                end
                default: st <= R_IDLE;
              endcase
            end
            if (sub == 4'd15) sub <= '0;
          end
        endcase
      end
    end
  end

endmodule
