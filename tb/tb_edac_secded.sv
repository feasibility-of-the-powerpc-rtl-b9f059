// tb_edac_secded: self-checking test of the SEC-DED EDAC codec.
//
// Checks the two codewords of the reference EDAC simulation (data 0 -> check
// bits 8'h30; data 64'h0000_0080_8080_8080 -> 8'hF7), the classification of
// the reference's corrupted check words (8'hF6 single error, 8'hF4 multiple
// error) and of its corrupted data word (...81 with 8'hF7 single error,
// corrected back to ...80). Then, for random words, flips every one of the 72
// code bits in turn (must be corrected, flagged single) and random pairs
// (must be flagged multiple), comparing against the uncorrupted word.
module tb_edac_secded;
  logic [63:0] din, dcorr;
  logic [7:0]  cin, cout, syn;
  logic        se, me;
  int checks = 0, failures = 0;

  edac_secded dut (.data_in(din), .chk_in(cin), .chk_out(cout), .data_corr(dcorr),
                   .syndrome(syn), .single_err(se), .multiple_err(me));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: din=%h cin=%h cout=%h corr=%h se=%b me=%b", what, din, cin, cout, dcorr, se, me);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] w, good;
    logic [7:0]  c;
    int b1, b2;
    din = 64'h0; cin = 8'h30; #1;
    check("zero word check bits", cout == 8'h30 && !se && !me);
    din = 64'h0000_0080_8080_8080; cin = 8'hF7; #1;
    check("reference word check bits", cout == 8'hF7 && !se && !me && dcorr == din);
    cin = 8'hF6; #1;
    check("check bit error", se && !me && dcorr == 64'h0000_0080_8080_8080);
    cin = 8'hF4; #1;
    check("double check bit error", !se && me);
    din = 64'h0000_0080_8080_8081; cin = 8'hF7; #1;
    check("data bit error", se && !me && dcorr == 64'h0000_0080_8080_8080);
    for (int n = 0; n < 40; n++) begin
      good = {$urandom, $urandom};
      din = good; cin = 8'h00; #1;
      c = cout;
      cin = c; #1;
      check("clean word", !se && !me && dcorr == good);
      for (int b = 0; b < 72; b++) begin
        w = good; cin = c;
        if (b < 64) w[b] = ~w[b]; else cin[b-64] = ~cin[b-64];
        din = w; #1;
        check("single flip", se && !me && dcorr == good);
      end
      for (int k = 0; k < 40; k++) begin
        b1 = $urandom_range(71); b2 = $urandom_range(71);
        if (b1 == b2) continue;
        w = good; cin = c;
        if (b1 < 64) w[b1] = ~w[b1]; else cin[b1-64] = ~cin[b1-64];
        if (b2 < 64) w[b2] = ~w[b2]; else cin[b2-64] = ~cin[b2-64];
        din = w; #1;
        check("double flip", !se && me);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
