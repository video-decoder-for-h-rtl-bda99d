// tb_cabac_bin_match: test of the bin matching state machines.
//
// Random values of every binarisation are turned into bin strings here
// (fixed length, truncated unary with and without the signed mapping, UEGk
// as used for motion vector differences and coefficient levels, the I and
// P mb_type tables and the P sub_mb_type table). The bins are fed to the
// matcher one per clock with random gaps; `match` must stay low until the
// last bin and rise on it with the original value. Each bin is consumed in
// the cycle it is presented, as the decoder needs one bin per cycle.
`timescale 1ns/1ps
module tb_cabac_bin_match;
  import cabac_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n = 1'b1;
  logic               start = 1'b0;
  cabac_req_t         req = '0;
  logic               bin_valid = 1'b0;
  logic               bin = 1'b0;
  logic               match;
  logic signed [31:0] value;
  bin_pos_t           nxt, pos;
  int checks = 0, failures = 0;
  int kinds_seen[16];

  cabac_bin_match dut (.clk(clk), .rst_n(rst_n), .start(start), .req(req),
                       .bin_valid(bin_valid), .bin(bin), .match(match), .value(value),
                       .nxt(nxt), .pos(pos));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  typedef bit bins_t[$];

  function automatic void tu_bins(ref bins_t b, input int v, input int cmax);
    for (int i = 0; i < v; i++) b.push_back(1'b1);
    if (v < cmax) b.push_back(1'b0);
  endfunction

  function automatic void mbi_bins(ref bins_t b, input int v);
    int t, luma, chroma, pred;
    if (v == 0) begin b.push_back(1'b0); return; end
    b.push_back(1'b1);
    if (v == 25) begin b.push_back(1'b1); return; end
    b.push_back(1'b0);
    t = v - 1;
    luma = t / 12; chroma = (t % 12) / 4; pred = t % 4;
    b.push_back(1'(luma));
    b.push_back(chroma != 0);
    if (chroma != 0) b.push_back(chroma == 2);
    b.push_back(1'(pred >> 1));
    b.push_back(1'(pred & 1));
  endfunction

  // Random value and its bin string for request r (r is completed here).
  function automatic int make(ref cabac_req_t r, ref bins_t b);
    int v, a, k, suf, sel;
    sel = $urandom_range(0, 8);
    r = '0;
    r.id = 8'($urandom);
    b.delete();
    case (sel)
      0: begin
        r.kind = bz_kind_e'($urandom_range(0, 2));
        v = $urandom_range(0, 1);
        b.push_back(1'(v));
      end
      1: begin
        r.kind = BZ_FL;
        r.cmax = 6'($urandom_range(1, 6));
        v = $urandom_range(0, (1 << r.cmax) - 1);
        for (int i = 0; i < r.cmax; i++) b.push_back(1'(v >> i));
      end
      2: begin
        r.kind = BZ_TU;
        r.cmax = 6'($urandom_range(1, 20));
        r.sgn  = 1'($urandom_range(0, 1));
        a = $urandom_range(0, r.cmax);
        tu_bins(b, a, r.cmax);
        v = !r.sgn ? a : (a % 2) ? (a + 1) / 2 : -(a / 2);
      end
      3, 4: begin
        r.kind = BZ_UEG;
        if (sel == 3) begin r.cmax = 6'd9; r.k = 2'd3; r.sgn = 1'b1; end
        else          begin r.cmax = 6'd14; r.k = 2'd0; r.sgn = 1'b0; end
        a = ($urandom_range(0, 1)) ? $urandom_range(0, 20) : $urandom_range(0, 3000);
        tu_bins(b, (a < r.cmax) ? a : r.cmax, r.cmax);
        if (a >= r.cmax) begin
          suf = a - r.cmax;
          k = r.k;
          while (suf >= (1 << k)) begin
            b.push_back(1'b1);
            suf -= 1 << k;
            k++;
          end
          b.push_back(1'b0);
          while (k > 0) begin
            k--;
            b.push_back(1'(suf >> k));
          end
        end
        v = a;
        if (r.sgn && a != 0) begin
          if ($urandom_range(0, 1)) begin
            b.push_back(1'b1);
            v = -a;
          end else b.push_back(1'b0);
        end
      end
      5: begin
        r.kind = BZ_MBTYPE_I;
        v = $urandom_range(0, 25);
        mbi_bins(b, v);
      end
      6: begin
        r.kind = BZ_MBTYPE_P;
        v = $urandom_range(0, 30);
        case (v)
          0: begin b.push_back(0); b.push_back(0); b.push_back(0); end
          1: begin b.push_back(0); b.push_back(1); b.push_back(1); end
          2: begin b.push_back(0); b.push_back(1); b.push_back(0); end
          3: begin b.push_back(0); b.push_back(0); b.push_back(1); end
          4: v = 0;
          default: begin
            b.push_back(1'b1);
            mbi_bins(b, v - 5);
          end
        endcase
        if (b.size() == 0) begin b.push_back(0); b.push_back(0); b.push_back(0); end
      end
      default: begin
        r.kind = BZ_SUBMB_P;
        v = $urandom_range(0, 3);
        case (v)
          0: b.push_back(1);
          1: begin b.push_back(0); b.push_back(0); end
          2: begin b.push_back(0); b.push_back(1); b.push_back(1); end
          default: begin b.push_back(0); b.push_back(1); b.push_back(0); end
        endcase
      end
    endcase
    return v;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cabac_req_t r;
    bins_t b;
    int v, early;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      v = make(r, b);
      kinds_seen[int'(r.kind)]++;
      @(negedge clk);
      req   = r;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      early = 0;
      for (int i = 0; i < b.size(); i++) begin
        while ($urandom_range(0, 4) == 0) begin
          bin_valid = 1'b0;
          @(negedge clk);
        end
        bin_valid = 1'b1;
        bin = b[i];
        #1;
        if (i < b.size() - 1) begin
          if (match) early++;
        end else begin
          check(match && value == v,
                $sformatf("kind %0d bins %p: match %0d value %0d, expected %0d",
                          r.kind, b, match, value, v));
        end
        @(negedge clk);
      end
      bin_valid = 1'b0;
      check(early == 0, $sformatf("kind %0d bins %p: match before the last bin", r.kind, b));
    end
    for (int k = 0; k <= 8; k++) check(kinds_seen[k] > 0, $sformatf("kind %0d tested", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
