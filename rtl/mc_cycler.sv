// mc_cycler: the memory controller's cycle state machine ("cycler()").
//
// Four flows, as in the design description: SRAM single-beat transfers, SRAM
// bursts (four 64-bit beats, one per clock), I/O and Flash transfers, and
// error transfers. Each starts on new_cyc from mc_start, waits the access time
// CTIME given by mc_chipsel, and then runs the data tenure:
//
//   * SRAM read: each beat is put on the bus with TA and captured (cap). With
//     EDAC_EN the captured beat is checked in the next clock, in parallel with
//     the next beat. On a correctable error that clock carries DRTRY instead
//     of TA, the corrected word and its check bits are written back to the
//     SRAM (scrub), and in the clock after the corrected beat is given with
//     TA; the burst then continues. On an uncorrectable error mcp_req pulses
//     (the machine-check interrupt) and the transfer completes. AACK is given
//     in the clock that ends the transfer, after the last check.
//   * SRAM write: one beat per clock with TA and the byte-lane write strobe.
//     With EDAC_EN, a write of fewer than eight bytes is a read-modify-write:
//     the word is read and checked (rmw_rd), then the CPU's bytes are merged
//     into the corrected word and the whole word is written with new check
//     bits (rmw_wr), with TA.
//   * I/O and Flash: one beat with TA and AACK; the FPGA-register strobes
//     pb_rd/pb_wr or the Flash/SCC write strobe are given in that clock.
//   * Error: TEA with AACK. Address-only transfers end with AACK alone.
//
// Timing (bus clocks after new_cyc): first TA after CTIME+1 clocks
// (CTIME = 0 gives it after one), burst beats back to back, one extra clock
// per corrected beat, one extra clock per read-modify-write.
//
// From the document: the four flows, the CTIME delay, the AACK/TA/TEA/BAA
// outputs and the use of DRTRY for corrected data and MCP for uncorrectable
// errors (Sections 3.2.2.2 and 6). The exact clock of each strobe, the
// write-back of corrected data and the read-modify-write are this design's
// choices. baa_n (burst address advance) is asserted on the beats after the
// first of a burst, for memories with an internal burst counter.
module mc_cycler
  import obc_pkg::*;
#(
  parameter bit EDAC_EN = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       new_cyc,
  input  flow_e      flow,
  input  logic [3:0] ctime,
  input  logic       write,
  input  logic       addr_only,
  input  logic       full_word,     // all eight byte lanes written
  input  logic       single_err,    // EDAC result for the captured word
  input  logic       multiple_err,
  output logic       aack_n,
  output logic       ta_n,
  output logic       tea_n,
  output logic       drtry_n,
  output logic       baa_n,
  output logic [1:0] beat,          // beat whose address the memory sees
  output logic       cap,           // capture the word on the read path
  output logic       use_corr,      // drive the corrected word to the CPU
  output logic       mem_we,        // byte-lane write strobe (CPU data)
  output logic       scrub_we,      // write corrected word back (all lanes)
  output logic       rmw_we,        // write merged word (all lanes)
  output logic       rmw_rd,        // read phase of read-modify-write
  output logic       pb_rd,
  output logic       pb_wr,
  output logic       mcp_req,
  output logic       busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT, S_RBEAT, S_RFIX, S_WBEAT, S_RMW_RD, S_RMW_WR, S_IO, S_ERR, S_AONLY
  } state_e;

  state_e     state, nstate;
  logic [3:0] cnt;
  logic [1:0] next_beat;     // next beat to present
  logic [1:0] cap_beat;      // beat captured and awaiting its check
  logic       chk_valid;     // a captured beat awaits its check
  logic [2:0] beats_left;    // beats still to present
  flow_e      flow_q;
  logic       write_q;
  logic       full_q;
  logic       err_now;

  function automatic state_e data_state(input flow_e f, input logic wr, input logic full);
    case (f)
      FLOW_SRAM_SINGLE, FLOW_SRAM_BURST:
        return wr ? ((EDAC_EN && !full && f == FLOW_SRAM_SINGLE) ? S_RMW_RD : S_WBEAT) : S_RBEAT;
      FLOW_IO_FLASH: return S_IO;
      default:       return S_ERR;
    endcase
  endfunction

  assign err_now = EDAC_EN && chk_valid && single_err;

  // ------------------------------------------------------------ next state
  always_comb begin
    nstate = state;
    unique case (state)
      S_IDLE: if (new_cyc) begin
        if (addr_only) nstate = S_AONLY;
        else if (flow == FLOW_ERROR) nstate = S_ERR;
        else if (ctime == 4'd0) nstate = data_state(flow, write, full_word);
        else nstate = S_WAIT;
      end
      S_WAIT:   if (cnt == 4'd0) nstate = data_state(flow_q, write_q, full_q);
      S_RBEAT: begin
        if (err_now) nstate = S_RFIX;
        else if (beats_left == 3'd0 || (beats_left == 3'd1 && !EDAC_EN)) nstate = S_IDLE;
      end
      S_RFIX:   nstate = (beats_left == 3'd0) ? S_IDLE : S_RBEAT;
      S_WBEAT:  if (beats_left == 3'd1) nstate = S_IDLE;
      S_RMW_RD: nstate = S_RMW_WR;
      S_RMW_WR: nstate = S_IDLE;
      S_IO, S_ERR, S_AONLY: nstate = S_IDLE;
      default:  nstate = S_IDLE;
    endcase
  end

  // ---------------------------------------------------------- state update
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= '0;
      next_beat  <= '0;
      cap_beat   <= '0;
      chk_valid  <= 1'b0;
      beats_left <= '0;
      flow_q     <= FLOW_SRAM_SINGLE;
      write_q    <= 1'b0;
      full_q     <= 1'b0;
    end else begin
      state <= nstate;
      unique case (state)
        S_IDLE: if (new_cyc) begin
          cnt        <= (ctime == 4'd0) ? 4'd0 : ctime - 4'd1;
          flow_q     <= flow;
          write_q    <= write;
          full_q     <= full_word;
          next_beat  <= '0;
          chk_valid  <= 1'b0;
          beats_left <= (flow == FLOW_SRAM_BURST) ? 3'd4 : 3'd1;
        end
        S_WAIT: if (cnt != 4'd0) cnt <= cnt - 4'd1;
        S_RBEAT: begin
          if (err_now) begin
            chk_valid <= 1'b0;               // corrected beat follows in S_RFIX
          end else if (beats_left != 3'd0) begin
            cap_beat   <= next_beat;
            next_beat  <= next_beat + 2'd1;
            beats_left <= beats_left - 3'd1;
            chk_valid  <= EDAC_EN;
          end else begin
            chk_valid <= 1'b0;
          end
        end
        S_WBEAT: begin
          next_beat  <= next_beat + 2'd1;
          beats_left <= beats_left - 3'd1;
        end
        default: ;
      endcase
    end
  end

  // --------------------------------------------------------------- outputs
  always_comb begin
    aack_n   = 1'b1;
    ta_n     = 1'b1;
    tea_n    = 1'b1;
    drtry_n  = 1'b1;
    baa_n    = 1'b1;
    beat     = next_beat;
    cap      = 1'b0;
    use_corr = 1'b0;
    mem_we   = 1'b0;
    scrub_we = 1'b0;
    rmw_we   = 1'b0;
    rmw_rd   = 1'b0;
    pb_rd    = 1'b0;
    pb_wr    = 1'b0;
    mcp_req  = 1'b0;
    unique case (state)
      S_RBEAT: begin
        if (EDAC_EN && chk_valid && multiple_err) mcp_req = 1'b1;
        if (err_now) begin
          drtry_n  = 1'b0;
          scrub_we = 1'b1;
          use_corr = 1'b1;
          beat     = cap_beat;
        end else if (beats_left != 3'd0) begin
          ta_n  = 1'b0;
          cap   = 1'b1;
          baa_n = (flow_q == FLOW_SRAM_BURST && next_beat != 2'd0) ? 1'b0 : 1'b1;
          if (beats_left == 3'd1 && !EDAC_EN) aack_n = 1'b0;
        end else begin
          aack_n = 1'b0;                      // last beat checked clean
        end
      end
      S_RFIX: begin
        ta_n     = 1'b0;
        use_corr = 1'b1;
        beat     = cap_beat;
        if (beats_left == 3'd0) aack_n = 1'b0;
      end
      S_WBEAT: begin
        ta_n   = 1'b0;
        mem_we = 1'b1;
        baa_n  = (flow_q == FLOW_SRAM_BURST && next_beat != 2'd0) ? 1'b0 : 1'b1;
        if (beats_left == 3'd1) aack_n = 1'b0;
      end
      S_RMW_RD: begin
        rmw_rd = 1'b1;
        cap    = 1'b1;
      end
      S_RMW_WR: begin
        rmw_we  = 1'b1;
        ta_n    = 1'b0;
        aack_n  = 1'b0;
        mcp_req = multiple_err;
      end
      S_IO: begin
        ta_n   = 1'b0;
        aack_n = 1'b0;
        cap    = !write_q;
        pb_rd  = !write_q;
        pb_wr  = write_q;
        mem_we = write_q;
      end
      S_ERR: begin
        tea_n  = 1'b0;
        aack_n = 1'b0;
      end
      S_AONLY: aack_n = 1'b0;
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

endmodule
