// i2c_slave_model: behavioural I2C slave with an auto-incrementing register
// pointer (like a real-time clock), for testbenches.
//
// Responds to device address ADDR. After its address with the write bit, the
// first byte written sets the register pointer and further bytes are stored
// at the pointer, which then increments. After its address with the read bit
// it returns the register at the pointer and increments; it stops sending when
// the master does not acknowledge. The lines are open drain: the model pulls
// sda low through sda_oe. Data is sampled on rising SCL and changed on falling
// SCL. It counts starts, stops and bytes for the checks.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h68
) (
  input  logic scl,
  input  logic sda,
  output logic sda_oe
);
  logic [7:0] regs [16];
  logic [3:0] ptr;
  int starts, stops, bytes_rx, bytes_tx;
  logic active, reading, addr_phase, want_ptr, ackph, nack;
  logic [7:0] sh;
  int bitn;

  initial begin
    for (int i = 0; i < 16; i++) regs[i] = 8'(8'h10 + i);
    starts = 0; stops = 0; bytes_rx = 0; bytes_tx = 0;
    sda_oe = 0; active = 0; reading = 0; addr_phase = 0; want_ptr = 0;
    ackph = 0; nack = 0; ptr = 0; bitn = 0; sh = 0;
  end

  always @(negedge sda) if (scl && $time > 0) begin
    starts++; active = 1; reading = 0; addr_phase = 1; bitn = -1; ackph = 0; sda_oe = 0;
  end
  always @(posedge sda) if (scl && $time > 0) begin
    stops++; active = 0; sda_oe = 0;
  end

  always @(posedge scl) if (active) begin
    if (ackph) begin
      if (reading) nack = sda;
    end else if (!reading) begin
      sh = {sh[6:0], sda};
    end
  end

  always @(negedge scl) if (active) begin
    if (ackph) begin
      ackph = 0; sda_oe = 0; bitn = 0;
      if (reading) begin
        if (nack) active = 0;
        else begin sh = regs[ptr]; ptr = ptr + 4'd1; sda_oe = !sh[7]; bytes_tx++; end
      end
    end else begin
      bitn++;
      if (reading) begin
        if (bitn < 8) sda_oe = !sh[7 - bitn];
        else begin sda_oe = 0; ackph = 1; end
      end else if (bitn == 8) begin
        ackph = 1;
        if (addr_phase) begin
          addr_phase = 0;
          if (sh[7:1] == ADDR) begin
            sda_oe = 1; nack = 0;
            reading = sh[0];
            want_ptr = !sh[0];
          end else active = 0;
        end else begin
          bytes_rx++; sda_oe = 1;
          if (want_ptr) begin ptr = sh[3:0]; want_ptr = 0; end
          else begin regs[ptr] = sh; ptr = ptr + 4'd1; end
        end
      end
    end
  end
endmodule
