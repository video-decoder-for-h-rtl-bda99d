// cabac_ref_pkg: behavioural reference model of CABAC decoding for the
// testbenches.
//
// Written as plain sequential code after the H.264 decoding process, not
// after the RTL: a bit array as the stream, an array of 448 context models
// addressed by (group*4 + slot), the arithmetic decoder with a bit-by-bit
// renormalisation loop, and one procedure per binarisation that calls the
// decoder bin by bin. It also gives the stand-in contents of the context
// init ROM used by the testbenches (the real (m,n) tables are not part of
// the design) and the model that init produces from an (m,n) pair.
package cabac_ref_pkg;
  import cabac_pkg::*;

  // Stand-in (m,n) ROM: m in -45..45, n in 0..126.
  function automatic logic [15:0] rom_word(int addr);
    int m, n;
    m = ((addr * 37 + 5) % 91) - 45;
    n = (addr * 53 + 11) % 127;
    return {8'(m), 8'(n)};
  endfunction

  function automatic logic [6:0] init_model(logic [15:0] w, int qp);
    int m, n, pre, q;
    m = $signed(w[15:8]);
    n = $signed(w[7:0]);
    q = (qp > 51) ? 51 : qp;
    pre = ((m * q) >>> 4) + n;
    if (pre < 1) pre = 1;
    if (pre > 126) pre = 126;
    if (pre <= 63) return {1'b0, 6'(63 - pre)};
    else           return {1'b1, 6'(pre - 64)};
  endfunction

  function automatic int lps_range(int s, int q);
    int t[64][4] = '{
      '{128,176,208,240},'{128,167,197,227},'{128,158,187,216},'{123,150,178,205},
      '{116,142,169,195},'{111,135,160,185},'{105,128,152,175},'{100,122,144,166},
      '{95,116,137,158},'{90,110,130,150},'{85,104,123,142},'{81,99,117,135},
      '{77,94,111,128},'{73,89,105,122},'{69,85,100,116},'{66,80,95,110},
      '{62,76,90,104},'{59,72,86,99},'{56,69,81,94},'{53,65,77,89},
      '{51,62,73,85},'{48,59,69,80},'{46,56,66,76},'{43,53,63,72},
      '{41,50,59,69},'{39,48,56,65},'{37,45,54,62},'{35,43,51,59},
      '{33,41,48,56},'{32,39,46,53},'{30,37,43,50},'{29,35,41,48},
      '{27,33,39,45},'{26,31,37,43},'{24,30,35,41},'{23,28,33,39},
      '{22,27,32,37},'{21,26,30,35},'{20,24,29,33},'{19,23,27,31},
      '{18,22,26,30},'{17,21,25,28},'{16,20,23,27},'{15,19,22,25},
      '{14,18,21,24},'{14,17,20,23},'{13,16,19,22},'{12,15,18,21},
      '{12,14,17,20},'{11,14,16,19},'{11,13,15,18},'{10,12,15,17},
      '{10,12,14,16},'{9,11,13,15},'{9,11,12,14},'{8,10,12,14},
      '{8,9,11,13},'{7,9,11,12},'{7,9,10,12},'{7,8,10,11},
      '{6,8,9,11},'{6,7,9,10},'{6,7,8,9},'{2,2,2,2}};
    return t[s][q];
  endfunction

  function automatic int trans_lps(int s);
    int t[64] = '{0,0,1,2,2,4,4,5,6,7,8,9,9,11,11,12,13,13,15,15,16,16,18,18,
                  19,19,21,21,22,22,23,24,24,25,26,26,27,27,28,29,29,30,30,30,
                  31,32,32,33,33,33,34,34,35,35,35,36,36,36,37,37,37,38,38,63};
    return t[s];
  endfunction

  class cabac_ref;
    bit          bits[];
    int          ptr;
    int          range, offset;
    logic [6:0]  ctx[448];
    int          nbins;
    bit          term_hit;   // a terminate bin decoded as 1

    function new(int nbits);
      bits = new[nbits];
    endfunction

    function int rd();
      int b;
      b = (ptr < bits.size()) ? int'(bits[ptr]) : 0;
      ptr++;
      return b;
    endfunction

    function void init_ctx(int table_sel, int qp);
      for (int i = 0; i < 448; i++) ctx[i] = init_model(rom_word(table_sel * 448 + i), qp);
    endfunction

    function void init_engine();
      range  = 510;
      offset = 0;
      for (int i = 0; i < 9; i++) offset = (offset << 1) | rd();
    endfunction

    function int decision(int idx);
      int s, mps, rl, b;
      s   = ctx[idx][5:0];
      mps = ctx[idx][6];
      rl  = lps_range(s, (range >> 6) & 3);
      range = range - rl;
      if (offset >= range) begin
        b      = 1 - mps;
        offset = offset - range;
        range  = rl;
        if (s == 0) mps = 1 - mps;
        s = trans_lps(s);
      end else begin
        b = mps;
        if (s < 62) s = s + 1;
      end
      ctx[idx] = {1'(mps), 6'(s)};
      while (range < 256) begin
        range  = range << 1;
        offset = (offset << 1) | rd();
      end
      nbins++;
      return b;
    endfunction

    function int bypass();
      nbins++;
      offset = (offset << 1) | rd();
      if (offset >= range) begin
        offset = offset - range;
        return 1;
      end
      return 0;
    endfunction

    function int term();
      nbins++;
      range = range - 2;
      if (offset >= range) begin
        term_hit = 1'b1;
        return 1;
      end
      while (range < 256) begin
        range  = range << 1;
        offset = (offset << 1) | rd();
      end
      return 0;
    endfunction

    static function int cidx(int base, int inc);
      return (base + inc / 4) * 4 + (inc % 4);
    endfunction

    function int tu(cabac_req_t r, int cmax);
      int k, inc;
      k = 0;
      while (k < cmax) begin
        if (k == 0) inc = r.inc0;
        else begin
          inc = r.inc1 + k - 1;
          if (inc > r.inc_max) inc = r.inc_max;
        end
        if (decision(cidx(r.grp_base, inc)) == 0) break;
        k++;
      end
      return k;
    endfunction

    function int intra_i(int b0idx, int base, bit p_slice, int base2);
      int luma, chroma, pred;
      if (!p_slice) begin
        if (decision(b0idx) == 0) return 0;
        if (term()) return 25;
        luma = decision(cidx(base, 3));
        if (decision(cidx(base, 4))) begin
          chroma = decision(cidx(base, 5)) ? 2 : 1;
          pred = decision(cidx(base, 6)) * 2;
          pred += decision(cidx(base, 7));
        end else begin
          chroma = 0;
          pred = decision(cidx(base, 6)) * 2;
          pred += decision(cidx(base, 7));
        end
      end else begin
        if (decision(b0idx) == 0) return 0;
        if (term()) return 25;
        luma = decision(cidx(base2, 1));
        if (decision(cidx(base2, 2))) begin
          chroma = decision(cidx(base2, 2)) ? 2 : 1;
          pred = decision(cidx(base2, 3)) * 2;
          pred += decision(cidx(base2, 3));
        end else begin
          chroma = 0;
          pred = decision(cidx(base2, 3)) * 2;
          pred += decision(cidx(base2, 3));
        end
      end
      return 1 + pred + 4 * chroma + 12 * luma;
    endfunction

    function int decode(cabac_req_t r);
      int v, k, b1;
      case (r.kind)
        BZ_FLAG:   return decision(cidx(r.grp_base, r.inc0));
        BZ_BYPASS: return bypass();
        BZ_TERM:   return term();
        BZ_FL: begin
          v = 0;
          for (int i = 0; i < r.cmax; i++) v |= decision(cidx(r.grp_base, r.inc0)) << i;
          return v;
        end
        BZ_TU: begin
          v = tu(r, r.cmax);
          if (r.sgn) v = (v % 2) ? (v + 1) / 2 : -(v / 2);
          return v;
        end
        BZ_UEG: begin
          v = tu(r, r.cmax);
          if (v == r.cmax) begin
            k = r.k;
            while (bypass()) begin
              v += 1 << k;
              k++;
            end
            while (k > 0) begin
              k--;
              v += bypass() << k;
            end
          end
          if (r.sgn && v != 0 && bypass()) v = -v;
          return v;
        end
        BZ_MBTYPE_I: return intra_i(cidx(r.grp_base, r.inc0), r.grp_base, 1'b0, 0);
        BZ_MBTYPE_P: begin
          if (decision(cidx(r.grp_base, 0))) begin
            return 5 + intra_i(cidx(r.grp_base, 3), r.grp_base, 1'b1, r.grp_base2);
          end
          b1 = decision(cidx(r.grp_base, 1));
          if (decision(cidx(r.grp_base, b1 ? 3 : 2))) return b1 ? 1 : 3;
          else                                      return b1 ? 2 : 0;
        end
        BZ_SUBMB_P: begin
          if (decision(cidx(r.grp_base, 0))) return 0;
          if (!decision(cidx(r.grp_base, 1))) return 1;
          return decision(cidx(r.grp_base, 2)) ? 2 : 3;
        end
        default: return 0;
      endcase
    endfunction
  endclass

  // A random but well-formed request. Group bases stay below 100 so that
  // base + 3 fits the 112 groups; small bases make group reuse likely.
  function automatic cabac_req_t rand_req(int id, int ngrp);
    cabac_req_t r;
    int sel;
    r = '0;
    r.id        = 8'(id);
    r.grp_base  = 7'($urandom_range(0, ngrp - 1));
    r.grp_base2 = 7'($urandom_range(0, ngrp - 1));
    r.inc0      = 4'($urandom_range(0, 3));
    r.inc1      = 4'($urandom_range(0, 6));
    r.inc_max   = 4'(r.inc1 + $urandom_range(0, 3));
    r.pre_en    = 1'($urandom_range(0, 1));
    r.pre_grp   = 7'($urandom_range(0, ngrp - 1));
    sel = $urandom_range(0, 10);
    case (sel)
      0, 1: r.kind = BZ_FLAG;
      2:    r.kind = BZ_BYPASS;
      3: begin
        r.kind = BZ_TERM;
      end
      4: begin
        r.kind = BZ_FL;
        r.cmax = 6'($urandom_range(1, 4));
      end
      5: begin
        r.kind = BZ_TU;
        r.cmax = 6'($urandom_range(1, 8));
        r.sgn  = 1'($urandom_range(0, 1));
      end
      6, 7: begin
        r.kind = BZ_UEG;
        if ($urandom_range(0, 1)) begin
          r.cmax = 6'd9;  r.k = 2'd3; r.sgn = 1'b1;   // mvd
        end else begin
          r.cmax = 6'd14; r.k = 2'd0; r.sgn = 1'b0;   // coeff_abs_level_minus1
        end
      end
      8: r.kind = BZ_MBTYPE_I;
      9: r.kind = BZ_MBTYPE_P;
      default: r.kind = BZ_SUBMB_P;
    endcase
    return r;
  endfunction

endpackage
