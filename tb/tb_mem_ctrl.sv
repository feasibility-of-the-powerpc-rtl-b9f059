// tb_mem_ctrl: self-checking test of the memory controller with EDAC, driven
// through its 60x bus port by a bus-master model, with an SRAM model (data
// and check bits), a Flash array, an SCC data byte and a register file on the
// peripheral strobe bus.
//
// Checks: single-beat SRAM writes and reads of every size; four-beat bursts,
// including a burst starting in the middle of a line (wrapping order);
// partial writes done as read-modify-write that keep the other bytes and
// leave valid check bits; correction of single data-bit and check-bit errors
// with DRTRY, delivery of the corrected word and write-back to the SRAM
// (scrubbing), also inside a burst; a double error raising the machine-check
// request; Flash reads with wait states; SCC and register accesses with their
// strobes and data lanes; TEA for unmapped regions, wrong sizes and bursts to
// I/O; address-only transfers; and a long random mix of accesses compared
// with a reference memory.
module tb_mem_ctrl;
  import obc_pkg::*;
  localparam int W = 1024;
  logic clk = 0, rst = 1;
  logic ts_n = 1, tbst_n = 1;
  logic [31:0] a = 0;
  logic [4:0] tt = 0;
  logic [2:0] tsiz = 0;
  logic [63:0] cpu_d_i = 0, cpu_d_o, mem_d_o, sram_d_i, flash_d_i;
  logic cpu_d_oe, aack_n, ta_n, tea_n, drtry_n, baa_n, adsc_n;
  logic [18:0] mem_a;
  logic [7:0] bwe_n;
  logic scs_n, soe_n, sram_cwe_n, fcs_n, foe_n, xoe_n, scc_dc;
  logic [15:0] sram_c_o, sram_c_i;
  logic [1:0] xcs_n;
  logic [7:0] scc_d_i = 8'hC5;
  pbus_req_t pb_req;
  region_e pb_region;
  logic [31:0] pb_rdata;
  logic mcp_req, edac_corrected, busy;
  int checks = 0, failures = 0;
  int n_mcp = 0, n_scrub = 0, n_pbwr = 0, n_pbrd = 0, n_baa = 0;
  logic [63:0] flash [512];
  logic [63:0] refm [W];
  logic [31:0] regs [16][16];
  region_e last_wr_region;

  mem_ctrl dut (.*);
  sram_model #(.WORDS(W)) mem (
    .clk, .a(mem_a[17:0]), .cs_n(scs_n), .oe_n(soe_n), .bwe_n, .d_i(mem_d_o), .d_o(sram_d_i),
    .cwe_n(sram_cwe_n), .c_i(sram_c_o), .c_o(sram_c_i));

  assign flash_d_i = (!fcs_n && !foe_n) ? flash[mem_a[8:0]] : '0;
  assign pb_rdata  = regs[pb_region][pb_req.off];
  always @(posedge clk) begin
    if (pb_req.wr) begin regs[pb_region][pb_req.off] <= pb_req.wdata; n_pbwr++; last_wr_region <= pb_region; end
    if (pb_req.rd) n_pbrd++;
    if (mcp_req) n_mcp++;
    if (edac_corrected) n_scrub++;
    if (!baa_n) n_baa++;
  end

  always #5 clk = !clk;
  `include "cpu_bus_tasks.svh"

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #50000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [7:0] lane_mask(input logic [2:0] off, input logic [2:0] sz);
    int n; logic [7:0] m;
    n = (sz == 0) ? 8 : int'(sz);
    m = '0;
    for (int k = 0; k < 8; k++) if (k >= off && k < off + n) m[7 - k] = 1;
    return m;
  endfunction

  function automatic logic [63:0] merge(input logic [63:0] old, input logic [63:0] d, input logic [7:0] m);
    for (int k = 0; k < 8; k++) if (m[k]) old[8 * k +: 8] = d[8 * k +: 8];
    return old;
  endfunction

  function automatic logic [63:0] masked(input logic [63:0] d, input logic [7:0] m);
    for (int k = 0; k < 8; k++) if (!m[k]) d[8 * k +: 8] = 0;
    return d;
  endfunction

  function automatic logic codeword_ok(input int w);
    return mem.cmem[w][7:0] == edac_encode(mem.mem[w]);
  endfunction

  logic [63:0] d, wd [4], rd [4];
  logic e;
  int drt0, mcp0, scr0, stall0;

  initial begin
    for (int i = 0; i < 512; i++) flash[i] = {$urandom, $urandom};
    for (int i = 0; i < W; i++) refm[i] = 0;
    for (int r = 0; r < 16; r++) for (int o = 0; o < 16; o++) regs[r][o] = {4'(r), 4'(o), 24'h0};
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // ---- single-beat full words
    for (int i = 0; i < 8; i++) begin
      d = {$urandom, $urandom};
      bus_write(32'(i * 8), 3'd0, d, e); refm[i] = d;
      chk(!e && bus_first_ta == 3, "write: TA after SRAM CTIME");
    end
    for (int i = 0; i < 8; i++) begin
      bus_read(32'(i * 8), 3'd0, d, e);
      chk(!e && d == refm[i], "read back");
      chk(codeword_ok(i), "check bits written");
    end
    // ---- bursts
    for (int k = 0; k < 4; k++) wd[k] = {$urandom, $urandom};
    bus_burst_write(32'h0000_0100, wd, e);
    for (int k = 0; k < 4; k++) refm[32 + k] = wd[k];
    chk(!e && bus_clocks == 6, "burst write: four beats back to back");
    bus_burst_read(32'h0000_0100, rd, e);
    for (int k = 0; k < 4; k++) chk(rd[k] == refm[32 + k], "burst read beat");
    chk(n_baa >= 6, "burst address advance");
    bus_burst_read(32'h0000_0110, rd, e);
    for (int k = 0; k < 4; k++) chk(rd[k] == refm[32 + ((k + 2) % 4)], "burst wraps from double word 2");
    // ---- partial writes (read-modify-write)
    for (int i = 0; i < 40; i++) begin
      logic [2:0] sz, off; int w; logic [7:0] m;
      sz = 3'($urandom % 3 + 1); if (sz == 3) sz = 4;
      off = 3'($urandom % 8); off = off & ~(sz - 3'd1);
      w = $urandom % 16;
      d = {$urandom, $urandom};
      m = lane_mask(off, sz);
      bus_write(32'(w * 8 + int'(off)), sz, d, e);
      refm[w] = merge(refm[w], d, m);
      chk(!e && mem.mem[w] == refm[w], "partial write merged");
      chk(codeword_ok(w), "partial write check bits");
      bus_read(32'(w * 8 + int'(off)), sz, d, e);
      chk(masked(d, m) == masked(refm[w], m), "partial read");
    end
    // ---- single data-bit error: corrected, DRTRY, scrubbed
    drt0 = bus_drtry; scr0 = n_scrub;
    mem.mem[3][41] = !mem.mem[3][41];
    bus_read(32'h18, 3'd0, d, e);
    chk(d == refm[3], "corrected data delivered");
    chk(bus_drtry == drt0 + 1, "DRTRY for corrected beat");
    chk(n_scrub == scr0 + 1 && mem.mem[3] == refm[3] && codeword_ok(3), "corrected word written back");
    bus_read(32'h18, 3'd0, d, e);
    chk(bus_drtry == drt0 + 1, "no DRTRY after scrub");
    // ---- check-bit error
    mem.cmem[5][2] = !mem.cmem[5][2];
    bus_read(32'h28, 3'd0, d, e);
    chk(d == refm[5] && bus_drtry == drt0 + 2 && codeword_ok(5), "check-bit error corrected");
    // ---- error inside a burst
    mem.mem[34][7] = !mem.mem[34][7];
    bus_burst_read(32'h100, rd, e);
    for (int k = 0; k < 4; k++) chk(rd[k] == refm[32 + k], "burst with corrected beat");
    chk(bus_drtry == drt0 + 3 && mem.mem[34] == refm[34], "burst beat scrubbed");
    // ---- error in the old word of a read-modify-write
    mem.mem[6][60] = !mem.mem[6][60];
    bus_write(32'h30, 3'd1, 64'hAB00_0000_0000_0000, e);
    refm[6] = merge(refm[6], 64'hAB00_0000_0000_0000, 8'h80);
    chk(mem.mem[6] == refm[6] && codeword_ok(6), "RMW over a corrected word");
    // ---- double error: machine check
    mcp0 = n_mcp;
    mem.mem[7][0] = !mem.mem[7][0]; mem.mem[7][9] = !mem.mem[7][9];
    bus_read(32'h38, 3'd0, d, e);
    chk(n_mcp == mcp0 + 1, "uncorrectable error raises machine check");
    mem.mem[7] = refm[7];
    // ---- Flash
    stall0 = bus_stall;
    bus_read(32'hF000_0040, 3'd0, d, e);
    chk(!e && d == flash[8], "Flash read");
    chk(bus_first_ta == 8, "Flash wait states (CTIME 6)");
    chk(bus_stall - stall0 == 7, "stall clocks counted");
    bus_read(32'hF000_0044, 3'd4, d, e);
    chk(d[31:0] == flash[8][31:0], "Flash word on its lanes");
    // ---- SCC
    bus_read(32'h4000_0010, 3'd1, d, e);
    chk(!e && d[63:56] == 8'hC5 && bus_first_ta == 10, "SCC read with its access time");
    // ---- registers
    bus_write(32'h1000_00C0, 3'd1, 64'h5A00_0000_0000_0000, e);
    chk(!e && regs[1][12][31:24] == 8'h5A && last_wr_region == RG_UART1, "UART register write strobe");
    bus_read(32'h6000_0030, 3'd1, d, e);
    chk(d[63:56] == 8'h63, "I2C register read on D(0-7)");
    bus_write(32'hC000_0010, 3'd4, 64'h8000_1234_0000_0000, e);
    chk(!e && regs[12][1] == 32'h8000_1234, "interrupt controller 32-bit write");
    bus_read(32'h8000_0020, 3'd2, d, e);
    chk(!e && d[63:48] == 16'h8200, "debug port 16-bit read");
    // ---- errors
    drt0 = bus_tea;
    bus_read(32'h9000_0000, 3'd0, d, e);  chk(e, "unmapped region: TEA");
    bus_read(32'h1000_0000, 3'd2, d, e);  chk(e, "2-byte access to a UART: TEA");
    bus_burst_read(32'hF000_0000, rd, e); chk(e, "burst to Flash: TEA");
    bus_write(32'hC000_0000, 3'd1, 0, e); chk(e, "byte access to interrupt controller: TEA");
    chk(bus_tea == drt0 + 4, "TEA count");
    // ---- address-only
    begin
      int ta0; ta0 = bus_ta;
      bus_xfer(32'h0000_0040, 5'b00000, 3'd0, 1'b0, wd, rd, e);
      chk(!e && bus_ta == ta0 && bus_clocks <= 3, "address-only transfer: AACK only");
    end
    // ---- random mix
    for (int i = 0; i < 400; i++) begin
      int w, op; logic [2:0] sz, off; logic [7:0] m;
      w = $urandom % 64; op = $urandom % 6;
      case (op)
        0: begin d = {$urandom, $urandom}; bus_write(32'(w * 8), 3'd0, d, e); refm[w] = d; end
        1: begin bus_read(32'(w * 8), 3'd0, d, e); chk(d == refm[w], "random read");
             if (d != refm[w]) $display("  w=%0d d=%h ref=%h mem=%h", w, d, refm[w], mem.mem[w]); end
        2: begin
          sz = 3'(1 << ($urandom % 3)); off = 3'($urandom % 8) & ~(sz - 3'd1);
          m = lane_mask(off, sz); d = {$urandom, $urandom};
          bus_write(32'(w * 8 + int'(off)), sz, d, e); refm[w] = merge(refm[w], d, m);
        end
        3: begin
          w = w & ~3;
          for (int k = 0; k < 4; k++) wd[k] = {$urandom, $urandom};
          bus_burst_write(32'(w * 8), wd, e);
          for (int k = 0; k < 4; k++) refm[w + k] = wd[k];
        end
        4: begin
          int s; s = $urandom % 4;
          bus_burst_read(32'((w & ~3) * 8 + s * 8), rd, e);
          for (int k = 0; k < 4; k++) chk(rd[k] == refm[(w & ~3) + (s + k) % 4], "random burst read");
        end
        default: begin
          int b; b = $urandom % 64;
          mem.mem[w][b] = !mem.mem[w][b];
          bus_read(32'(w * 8), 3'd0, d, e);
          chk(d == refm[w] && mem.mem[w] == refm[w], "random single-bit error corrected");
          if (d != refm[w] || mem.mem[w] != refm[w]) $display("  w=%0d d=%h ref=%h mem=%h", w, d, refm[w], mem.mem[w]);
        end
      endcase
      chk(!e, "no TEA on SRAM");
    end
    for (int w = 0; w < 64; w++) chk(mem.mem[w] == refm[w] && codeword_ok(w), "final memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
