// tb_cabac_ctxinc: test of the context selection for each bin position.
//
// For random requests of every binarisation and every bin position the
// expected (mode, group, slot) is derived here from the context-index
// increment rules, written as a lookup of the increment and then split as
// group = base + inc/4, slot = inc%4. The block is combinational.
`timescale 1ns/1ps
module tb_cabac_ctxinc;
  import cabac_pkg::*;
  import cabac_ref_pkg::*;

  cabac_req_t req = '0;
  bin_pos_t   pos = '0;
  ae_mode_e   mode;
  grp_t       grp;
  logic [1:0] slot;
  int checks = 0, failures = 0;

  cabac_ctxinc dut (.req(req), .pos(pos), .mode(mode), .grp(grp), .slot(slot));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected: returns mode; base and inc through outputs.
  function automatic ae_mode_e expect_ctx(cabac_req_t r, bin_pos_t p, output int base,
                                          output int inc);
    int i;
    base = r.grp_base;
    inc  = r.inc0;
    i    = p.idx;
    case (r.kind)
      BZ_BYPASS: return AE_BYPASS;
      BZ_TERM:   return AE_TERMINATE;
      BZ_TU, BZ_UEG: begin
        if (p.part != PART_MAIN) return AE_BYPASS;
        if (i > 0) begin
          inc = r.inc1 + i - 1;
          if (inc > r.inc_max) inc = r.inc_max;
        end
      end
      BZ_MBTYPE_I: begin
        case (i)
          0: inc = r.inc0;
          1: return AE_TERMINATE;
          2: inc = 3;
          3: inc = 4;
          4: inc = p.b3 ? 5 : 6;
          5: inc = p.b3 ? 6 : 7;
          default: inc = 7;
        endcase
      end
      BZ_MBTYPE_P: begin
        if (p.part == PART_MAIN) inc = (i == 0) ? 0 : (i == 1) ? 1 : (p.b1 ? 3 : 2);
        else begin
          base = r.grp_base2;
          case (i)
            0: begin base = r.grp_base; inc = 3; end
            1: return AE_TERMINATE;
            2: inc = 1;
            3: inc = 2;
            4: inc = p.b3 ? 2 : 3;
            default: inc = 3;
          endcase
        end
      end
      BZ_SUBMB_P: inc = i;
      default: inc = r.inc0;
    endcase
    return AE_DECISION;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base, inc, maxidx;
    ae_mode_e m;
    for (int n = 0; n < 3000; n++) begin
      req = rand_req(n, 100);
      maxidx = (req.kind == BZ_TU || req.kind == BZ_UEG) ? 14 : 6;
      pos.idx  = 6'($urandom_range(0, maxidx));
      pos.part = part_e'($urandom_range(0, 2));
      if (req.kind == BZ_MBTYPE_P && pos.part == PART_SIGN) pos.part = PART_SUFFIX;
      pos.b1 = 1'($urandom_range(0, 1));
      pos.b3 = 1'($urandom_range(0, 1));
      #1;
      m = expect_ctx(req, pos, base, inc);
      check(mode == m, $sformatf("kind %0d pos %p: mode %0d, expected %0d", req.kind, pos, mode, m));
      if (m == AE_DECISION)
        check(int'(grp) == base + inc / 4 && int'(slot) == inc % 4,
              $sformatf("kind %0d pos %p: group %0d slot %0d, expected %0d %0d",
                        req.kind, pos, grp, slot, base + inc / 4, inc % 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
