// i2c_bit_ctrl: bit command controller of the I2C master.
//
// Executes one bus-level command at a time: START (also a repeated start),
// STOP, WRITE of one bit, READ of one bit. Each command takes five phases,
// one per tick of the prescaled clock enable, so SCL runs at one fifth of the
// tick rate (the document's "five times the SCL frequency"). SCL is high in
// phases 1-3; data changes in phase 0 while SCL is low; a read samples SDA in
// phase 2. START drives SDA low in phase 2 with SCL high, STOP releases SDA in
// phase 3 with SCL high. Lines are open drain: scl_oe/sda_oe pull the line low.
// done pulses for one clock at the end of a command; dout is the bit read.
// busy follows the bus: set by a START and cleared by a STOP seen on the lines.
// The five-phase split is this design's; clock stretching and arbitration
// are not supported (the FPGA is the only master).
module i2c_bit_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic       ena,       // core enabled
  input  logic       tick,      // phase clock enable
  input  logic [1:0] cmd,       // 0 START, 1 STOP, 2 WRITE, 3 READ
  input  logic       go,        // start cmd (while idle)
  input  logic       din,
  output logic       dout,
  output logic       done,
  output logic       cmd_busy,
  output logic       bus_busy,
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       scl_oe,
  output logic       sda_oe
);

  localparam logic [1:0] C_START = 2'd0, C_STOP = 2'd1, C_WRITE = 2'd2, C_READ = 2'd3;

  logic [1:0] cmd_q;
  logic [2:0] ph;
  logic       din_q;
  logic       scl_v, sda_v;   // 1 = released
  logic [1:0] sda_s, scl_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_q <= C_START; ph <= '0; din_q <= 1'b1; cmd_busy <= 1'b0;
      done <= 1'b0; dout <= 1'b0; scl_v <= 1'b1; sda_v <= 1'b1;
      sda_s <= 2'b11; scl_s <= 2'b11; bus_busy <= 1'b0;
    end else begin
      done  <= 1'b0;
      sda_s <= {sda_s[0], sda_i};
      scl_s <= {scl_s[0], scl_i};
      if (scl_s[1] && scl_s[0] && sda_s[1] && !sda_s[0]) bus_busy <= 1'b1;
      if (scl_s[1] && scl_s[0] && !sda_s[1] && sda_s[0]) bus_busy <= 1'b0;
      if (!ena) begin
        cmd_busy <= 1'b0; scl_v <= 1'b1; sda_v <= 1'b1; ph <= '0;
      end else if (!cmd_busy) begin
        if (go) begin
          cmd_busy <= 1'b1; cmd_q <= cmd; din_q <= din; ph <= '0;
        end
      end else if (tick) begin
        unique case (cmd_q)
          C_START: begin
            scl_v <= (ph inside {3'd1, 3'd2, 3'd3});
            sda_v <= (ph inside {3'd0, 3'd1});
          end
          C_STOP: begin
            scl_v <= (ph != 3'd0);
            sda_v <= (ph inside {3'd3, 3'd4});
          end
          C_WRITE: begin
            scl_v <= (ph inside {3'd1, 3'd2, 3'd3});
            sda_v <= din_q;
          end
          C_READ: begin
            scl_v <= (ph inside {3'd1, 3'd2, 3'd3});
            sda_v <= 1'b1;
            if (ph == 3'd3) dout <= sda_i;   // SCL has been high since phase 1
          end
        endcase
        if (ph == 3'd4) begin
          ph <= '0; cmd_busy <= 1'b0; done <= 1'b1;
        end else begin
          ph <= ph + 3'd1;
        end
      end
    end
  end

  assign scl_oe = !scl_v;
  assign sda_oe = !sda_v;

endmodule
