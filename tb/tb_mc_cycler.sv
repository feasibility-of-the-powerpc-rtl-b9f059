// tb_mc_cycler: self-checking test of the cycler state machine.
//
// The test plays the rest of the memory controller: it starts transfers with
// new_cyc, chooses the flow, CTIME, direction and size, and answers the EDAC
// inputs from an error map indexed by the beat the cycler captured. Each
// transfer is traced clock by clock until AACK and checked for: the clock of
// the first TA (CTIME+1 after new_cyc), the number of TA, DRTRY and TEA
// clocks, AACK exactly once and in the last clock, the beat order of bursts,
// the write-back (scrub) of each corrected beat at the right address, the
// corrected beat repeated with TA after DRTRY, MCP on uncorrectable errors,
// read-modify-write for partial writes, register strobes for I/O transfers,
// and TEA for error transfers. Random transfers are run for all flows.
module tb_mc_cycler;
  import obc_pkg::*;
  logic clk = 0, rst = 1;
  logic new_cyc = 0, write = 0, addr_only = 0, full_word = 1;
  flow_e flow = FLOW_SRAM_SINGLE;
  logic [3:0] ctime = 0;
  logic single_err, multiple_err;
  logic aack_n, ta_n, tea_n, drtry_n, baa_n, cap, use_corr, mem_we, scrub_we;
  logic rmw_we, rmw_rd, pb_rd, pb_wr, mcp_req, busy;
  logic [1:0] beat;
  int checks = 0, failures = 0;
  logic err1 [4], err2 [4];
  logic [1:0] capb;
  logic capv;

  mc_cycler dut (.*);

  always #5 clk = !clk;

  // EDAC answer for the captured beat
  always @(posedge clk) begin
    if (rst) capv <= 0;
    else if (cap) begin capb <= beat; capv <= 1; end
    else if (scrub_we) err1[capb] <= 0;   // written back, now clean
  end
  assign single_err   = capv && err1[capb];
  assign multiple_err = capv && err2[capb];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // Run one transfer and check it.
  task automatic run(input flow_e f, input logic wr, input logic ao, input logic full,
                     input int c, input logic [3:0] e1, input logic [3:0] e2);
    int n_ta, n_dr, n_tea, n_aack, n_mcp, n_scrub, n_rmw, n_pb, first_ta, t, aack_t;
    int beats, nerr;
    int ta_beats [$];
    logic last_dr;
    for (int k = 0; k < 4; k++) begin err1[k] = e1[k]; err2[k] = e2[k]; end
    beats = (f == FLOW_SRAM_BURST) ? 4 : 1;
    @(negedge clk);
    new_cyc = 1; flow = f; write = wr; addr_only = ao; full_word = full; ctime = 4'(c);
    n_ta = 0; n_dr = 0; n_tea = 0; n_aack = 0; n_mcp = 0; n_scrub = 0; n_rmw = 0; n_pb = 0;
    first_ta = -1; aack_t = -1; last_dr = 0;
    for (t = 0; t < 40; t++) begin
      @(posedge clk); #1;
      if (t == 0) begin new_cyc = 0; end
      // sample the outputs of the clock that starts here (state t+1)
      if (!ta_n) begin
        n_ta++;
        if (first_ta < 0) first_ta = t + 1;
        if (last_dr) chk(use_corr && beat == capb, "corrected beat follows DRTRY");
        if (!wr && !use_corr) ta_beats.push_back(int'(beat));
        if (wr && mem_we) ta_beats.push_back(int'(beat));
      end
      last_dr = !drtry_n;
      if (!drtry_n) begin
        n_dr++;
        chk(scrub_we && ta_n && beat == capb, "scrub with DRTRY at captured beat");
      end
      if (!tea_n) n_tea++;
      if (mcp_req) n_mcp++;
      if (scrub_we) n_scrub++;
      if (rmw_we) n_rmw++;
      if (pb_rd || pb_wr) n_pb++;
      if (!aack_n) begin n_aack++; aack_t = t + 1; break; end
    end
    @(posedge clk); #1;
    chk(aack_n && ta_n && tea_n && drtry_n && !busy, "idle after AACK");
    chk(n_aack == 1, "one AACK");
    nerr = 0;
    for (int k = 0; k < beats; k++) nerr += e1[k] ? 1 : 0;
    if (ao) begin
      chk(aack_t == 1 && n_ta == 0 && n_tea == 0, "address-only: AACK alone");
    end else if (f == FLOW_ERROR) begin
      chk(aack_t == 1 && n_tea == 1 && n_ta == 0, "error flow: TEA with AACK");
    end else if (f == FLOW_IO_FLASH) begin
      chk(first_ta == c + 1 && aack_t == c + 1 && n_ta == 1, "I/O timing");
      chk(n_pb == 1 && ((wr && pb_wr_seen) || !wr), "register strobe");
    end else if (wr) begin
      if (!full && f == FLOW_SRAM_SINGLE) begin
        chk(n_rmw == 1 && n_ta == 1 && first_ta == c + 2 && aack_t == c + 2, "read-modify-write");
        chk(n_mcp == (e2[0] ? 1 : 0), "MCP on RMW read");
      end else begin
        chk(first_ta == c + 1 && n_ta == beats && aack_t == c + beats, "write beats");
        for (int k = 0; k < beats; k++) chk(ta_beats.size() == beats && ta_beats[k] == k, "write beat order");
      end
    end else begin
      // read with EDAC
      chk(first_ta == c + 1, "first read TA after CTIME+1");
      chk(n_ta == beats + nerr, "read TA count");
      chk(n_dr == nerr && n_scrub == nerr, "DRTRY and scrub per corrected beat");
      chk(aack_t == c + beats + 2 * nerr + (e1[beats-1] ? 0 : 1), "read AACK clock");
      chk(ta_beats.size() == beats, "raw beats");
      for (int k = 0; k < beats && k < ta_beats.size(); k++) chk(ta_beats[k] == k, "burst beat order");
      begin
        int nm; nm = 0;
        for (int k = 0; k < beats; k++) nm += e2[k] ? 1 : 0;
        chk(n_mcp == nm, "MCP per uncorrectable beat");
      end
    end
  endtask

  logic pb_wr_seen;
  always @(posedge clk) if (new_cyc) pb_wr_seen <= 0; else if (pb_wr) pb_wr_seen <= 1;

  initial begin
    for (int k = 0; k < 4; k++) begin err1[k] = 0; err2[k] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // directed cases
    run(FLOW_SRAM_SINGLE, 0, 0, 1, 1, 4'b0000, 4'b0000);
    run(FLOW_SRAM_SINGLE, 0, 0, 1, 1, 4'b0001, 4'b0000);
    run(FLOW_SRAM_BURST,  0, 0, 1, 1, 4'b0000, 4'b0000);
    run(FLOW_SRAM_BURST,  0, 0, 1, 1, 4'b0100, 4'b0000);
    run(FLOW_SRAM_BURST,  0, 0, 1, 0, 4'b1001, 4'b0000);
    run(FLOW_SRAM_BURST,  0, 0, 1, 2, 4'b0000, 4'b0010);
    run(FLOW_SRAM_BURST,  1, 0, 1, 1, 4'b0000, 4'b0000);
    run(FLOW_SRAM_SINGLE, 1, 0, 1, 1, 4'b0000, 4'b0000);
    run(FLOW_SRAM_SINGLE, 1, 0, 0, 1, 4'b0000, 4'b0000);
    run(FLOW_SRAM_SINGLE, 1, 0, 0, 1, 4'b0000, 4'b0001);
    run(FLOW_IO_FLASH,    0, 0, 1, 6, 4'b0000, 4'b0000);
    run(FLOW_IO_FLASH,    1, 0, 1, 8, 4'b0000, 4'b0000);
    run(FLOW_ERROR,       0, 0, 1, 1, 4'b0000, 4'b0000);
    run(FLOW_ERROR,       0, 1, 1, 1, 4'b0000, 4'b0000);
    // random
    for (int i = 0; i < 300; i++) begin
      flow_e f; logic [3:0] e1, e2;
      f = flow_e'($urandom % 4);
      e1 = 4'($urandom) & 4'($urandom);
      e2 = 4'($urandom) & 4'($urandom) & 4'($urandom) & ~e1;
      run(f, 1'($urandom), ($urandom % 8) == 0, 1'($urandom), $urandom % 10, e1, e2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
