// cpu_bus_tasks.svh: 603e bus-master tasks shared by the memory-controller
// and top-level testbenches. Included inside a module that declares clk,
// ts_n, a, tt, tsiz, tbst_n, cpu_d_i, cpu_d_o, aack_n, ta_n, tea_n, drtry_n.
//
// A transfer starts with a one-clock TS. The tasks then look at the bus one
// clock at a time until AACK: a TA clock delivers (read) or consumes (write)
// a beat, a DRTRY clock cancels the beat of the previous TA (the controller
// then repeats it with TA), TEA ends the transfer in error. They count the
// clocks, the wait (stall) clocks before the first TA, TA, DRTRY and TEA.
// TT codes: 01010 read, 00010 write, 00000 address-only.
int bus_ta = 0, bus_drtry = 0, bus_tea = 0, bus_stall = 0, bus_aack = 0;
int bus_first_ta;          // clocks from TS to the first TA of the last transfer
int bus_clocks;            // clocks from TS to AACK of the last transfer

task automatic bus_xfer(input logic [31:0] addr, input logic [4:0] ttv, input logic [2:0] sz,
                        input logic burst, input logic [63:0] wd [4],
                        output logic [63:0] rd [4], output logic err);
  int beat, t;
  logic seen_ta;
  err = 0; beat = 0; bus_first_ta = -1; seen_ta = 0;
  for (int k = 0; k < 4; k++) rd[k] = '0;
  @(posedge clk); #1;
  ts_n = 0; a = addr; tt = ttv; tsiz = sz; tbst_n = !burst; cpu_d_i = wd[0];
  for (t = 1; t < 200; t++) begin
    @(posedge clk); #1;
    ts_n = 1;
    if (seen_ta) begin
      cpu_d_i = wd[beat < 4 ? beat : 3];
      seen_ta = 0;
    end
    if (!drtry_n) begin
      bus_drtry++;
      if (beat > 0) beat--;
    end
    if (!ta_n) begin
      bus_ta++;
      if (bus_first_ta < 0) begin bus_first_ta = t; bus_stall += t - 1; end
      if (beat < 4) rd[beat] = cpu_d_o;
      beat++;
      seen_ta = 1;
    end
    if (!tea_n) begin bus_tea++; err = 1; end
    if (!aack_n) begin bus_aack++; break; end
  end
  bus_clocks = t;
  @(posedge clk); #1;
endtask

task automatic bus_write(input logic [31:0] addr, input logic [2:0] sz, input logic [63:0] d,
                         output logic err);
  logic [63:0] wd [4], rd [4];
  for (int k = 0; k < 4; k++) wd[k] = d;
  bus_xfer(addr, 5'b00010, sz, 1'b0, wd, rd, err);
endtask

task automatic bus_read(input logic [31:0] addr, input logic [2:0] sz, output logic [63:0] d,
                        output logic err);
  logic [63:0] wd [4], rd [4];
  for (int k = 0; k < 4; k++) wd[k] = '0;
  bus_xfer(addr, 5'b01010, sz, 1'b0, wd, rd, err);
  d = rd[0];
endtask

task automatic bus_burst_write(input logic [31:0] addr, input logic [63:0] wd [4], output logic err);
  logic [63:0] rd [4];
  bus_xfer(addr, 5'b00010, 3'b010, 1'b1, wd, rd, err);
endtask

task automatic bus_burst_read(input logic [31:0] addr, output logic [63:0] rd [4], output logic err);
  logic [63:0] wd [4];
  for (int k = 0; k < 4; k++) wd[k] = '0;
  bus_xfer(addr, 5'b01010, 3'b010, 1'b1, wd, rd, err);
endtask

// 8-bit register access: value on byte lane 0 (D(0-7))
task automatic reg_write8(input logic [31:0] addr, input logic [7:0] v);
  logic e;
  bus_write(addr, 3'd1, {v, 56'd0}, e);
endtask
task automatic reg_read8(input logic [31:0] addr, output logic [7:0] v);
  logic [63:0] d; logic e;
  bus_read(addr, 3'd1, d, e);
  v = d[63:56];
endtask
task automatic reg_write16(input logic [31:0] addr, input logic [15:0] v);
  logic e;
  bus_write(addr, 3'd2, {v, 48'd0}, e);
endtask
task automatic reg_read16(input logic [31:0] addr, output logic [15:0] v);
  logic [63:0] d; logic e;
  bus_read(addr, 3'd2, d, e);
  v = d[63:48];
endtask
task automatic reg_write32(input logic [31:0] addr, input logic [31:0] v);
  logic e;
  bus_write(addr, 3'd4, {v, 32'd0}, e);
endtask
task automatic reg_read32(input logic [31:0] addr, output logic [31:0] v);
  logic [63:0] d; logic e;
  bus_read(addr, 3'd4, d, e);
  v = d[63:32];
endtask
