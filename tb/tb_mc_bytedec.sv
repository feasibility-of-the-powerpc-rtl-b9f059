// tb_mc_bytedec: exhaustive self-checking test of the byte-lane decoder.
// Every combination of A(29-31), TSIZ, burst, write and enable is applied and
// the lane mask and BWE outputs are compared with a reference computed here
// byte by byte (lane k = address offset k = bits [63-8k -: 8]).
module tb_mc_bytedec;
  logic [2:0] a_lo, tsiz;
  logic burst, write, en;
  logic [7:0] lanes, bwe_n, exp_l;
  int checks = 0, failures = 0;

  mc_bytedec dut (.*);

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a_lo, tsiz, burst, write} = 8'(i);
      for (int e = 0; e < 2; e++) begin
        int n;
        en = e[0];
        #1;
        n = (tsiz == 0) ? 8 : int'(tsiz);
        exp_l = '0;
        for (int k = 0; k < 8; k++)
          if (burst || (k >= a_lo && k < a_lo + n)) exp_l[7-k] = 1'b1;
        checks++;
        if (lanes !== exp_l) begin
          failures++;
          $display("FAIL lanes a=%0d tsiz=%0d b=%0b: %h exp %h", a_lo, tsiz, burst, lanes, exp_l);
        end
        checks++;
        if (bwe_n !== ~(exp_l & {8{write & en}})) begin
          failures++;
          $display("FAIL bwe a=%0d tsiz=%0d w=%0b en=%0b: %h", a_lo, tsiz, write, en, bwe_n);
        end
      end
    end
    // spot checks from the bus definition: byte at offset 0 is lane 0 (MSB)
    a_lo = 0; tsiz = 1; burst = 0; write = 1; en = 1; #1;
    checks++; if (bwe_n !== 8'h7F) begin failures++; $display("FAIL byte0"); end
    a_lo = 4; tsiz = 4; #1;
    checks++; if (bwe_n !== 8'hF0) begin failures++; $display("FAIL word1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
