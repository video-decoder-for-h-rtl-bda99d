// tb_cabac_lps_lut: exhaustive check of the LPS range and state transition
// table. All 64 x 4 (state, quarter) entries are compared with an
// independently written copy of the standard's tables, and the MPS
// transition with its rule (state + 1, held at 62, 63 kept). The block is
// combinational, so each entry is applied and checked after a short delay.
`timescale 1ns/1ps
module tb_cabac_lps_lut;
  import cabac_ref_pkg::*;

  logic [5:0] pstate;
  logic [1:0] q;
  logic [7:0] rlps;
  logic [5:0] next_mps, next_lps;
  int checks = 0, failures = 0;

  cabac_lps_lut dut (.pstate(pstate), .q(q), .rlps(rlps), .next_mps(next_mps),
                     .next_lps(next_lps));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_mps;
    for (int s = 0; s < 64; s++) begin
      for (int qq = 0; qq < 4; qq++) begin
        pstate = 6'(s);
        q      = 2'(qq);
        #1;
        check(int'(rlps) == lps_range(s, qq),
              $sformatf("rangeLPS[%0d][%0d] = %0d, expected %0d", s, qq, rlps, lps_range(s, qq)));
      end
      exp_mps = (s == 63) ? 63 : (s >= 62 ? 62 : s + 1);
      check(int'(next_mps) == exp_mps, $sformatf("transMPS[%0d] = %0d", s, next_mps));
      check(int'(next_lps) == trans_lps(s), $sformatf("transLPS[%0d] = %0d", s, next_lps));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
