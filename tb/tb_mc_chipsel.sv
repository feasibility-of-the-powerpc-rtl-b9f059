// tb_mc_chipsel: self-checking test of the chip-select unit. For every region
// of the memory map, every size and burst/single, read and write, the region,
// flow, CTIME, CLAIM/DOERR and the chip selects are compared with the memory
// map and the size rules of the table it implements.
module tb_mc_chipsel;
  import obc_pkg::*;
  xfer_t xfer;
  logic cyc_active;
  region_e region;
  flow_e flow;
  logic [3:0] ctime;
  logic claim_n, doerr_n, scs_n, soe_n, fcs_n, foe_n, xoe_n;
  logic [1:0] xcs_n;
  int checks = 0, failures = 0;

  mc_chipsel dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: reg=%h tsiz=%0d burst=%0b wr=%0b ao=%0b", what,
               xfer.addr[31:28], xfer.tsiz, xfer.burst, xfer.write, xfer.addr_only);
    end
  endtask

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++)
      for (int s = 0; s < 8; s++)
        for (int b = 0; b < 2; b++)
          for (int w = 0; w < 2; w++)
            for (int ao = 0; ao < 2; ao++)
              for (int ca = 0; ca < 2; ca++) begin
                logic mapped, ok, e;
                int n, ct;
                xfer = '0;
                xfer.addr = {4'(r), 28'h0012340};
                xfer.tsiz = 3'(s);
                xfer.burst = b[0];
                xfer.write = w[0];
                xfer.addr_only = ao[0];
                cyc_active = ca[0];
                #1;
                n = (s == 0) ? 8 : s;
                mapped = !(r inside {9, 10, 11, 13, 14});
                case (r)
                  0:  begin ok = b || n inside {1, 2, 4, 8}; ct = 1; end
                  15: begin ok = !b && n inside {1, 2, 4, 8}; ct = 6; end
                  4, 5: begin ok = !b && n == 1; ct = 8; end
                  1, 2, 6: begin ok = !b && n == 1; ct = 1; end
                  3, 7, 8: begin ok = !b && n inside {1, 2}; ct = 1; end
                  12: begin ok = !b && n inside {2, 4}; ct = 1; end
                  default: begin ok = 0; ct = 1; end
                endcase
                if (ao) ok = 1;
                e = !mapped || !ok;
                chk(region == region_e'(r), "region");
                chk(ctime == 4'(ct), "ctime");
                chk(claim_n == !(ca && mapped), "claim");
                chk(doerr_n == !(ca && e), "doerr");
                if (e || ao) chk(flow == FLOW_ERROR, "flow err");
                else if (r == 0) chk(flow == (b ? FLOW_SRAM_BURST : FLOW_SRAM_SINGLE), "flow sram");
                else chk(flow == FLOW_IO_FLASH, "flow io");
                chk(scs_n == !(ca && !e && !ao && r == 0), "scs");
                chk(soe_n == !(ca && !e && !ao && r == 0 && !w), "soe");
                chk(fcs_n == !(ca && !e && !ao && r == 15), "fcs");
                chk(foe_n == !(ca && !e && !ao && r == 15 && !w), "foe");
                chk(xcs_n == {!(ca && !e && !ao && r == 4), !(ca && !e && !ao && r == 5)}, "xcs");
                chk(xoe_n == !(ca && !e && !ao && r inside {4, 5} && !w), "xoe");
              end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
