// tb_h264_parser_top: end-to-end test of the entropy-decoding front end at
// its default size (120 macroblock columns, 1920-pixel-wide frames).
//
// A behavioural bitstream memory holds three slices, each starting on a
// word boundary; between slices the bitstream buffer is flushed and the
// memory jumps to the next slice, as a controller does at a new NAL unit.
//   slice 1 (CABAC) : 12 header codes through the Exp-Golomb path, then
//                     slice_init and 1500 CABAC syntax elements;
//   slice 2 (CAVLC) : 400 Exp-Golomb codes with long (27-bit) codewords;
//   slice 3 (CABAC) : header, then 1500 CABAC elements with a different
//                     init table and QP.
// Header and CAVLC codes are checked against the values encoded here;
// CABAC results against the sequential reference decoder started at the
// same bit position. A terminate bin decoded as 1 starts a new slice on
// the same stream, as after end_of_slice_flag. A behavioural init ROM
// answers the context initialisation reads. In each mode the common info
// line buffer is filled for one line and read back through that mode's
// client port.
// Counted mechanisms (each must happen at least once): context miss with
// stall, CMRS hit switch, preload, write-back, bypass bin, terminate bin,
// bitstream refill, buffer flush, codeword of 27 bits or more, CAVLC and
// CABAC use of the common info buffer (mode switch), slice restart after a
// terminate bin. End-of-slice terminate requests are placed where the
// reference shows they decode as 1. Rate: one CABAC bin is decoded per
// cycle except for the stall cycles of context misses and the few cycles
// the bitstream window waits for a refill, so over a stretch of back-to-
// back requests bins + stalls must be at most the cycles the decoder was
// busy and fall short of them by no more than 60.
`timescale 1ns/1ps
module tb_h264_parser_top;
  import cabac_pkg::*;
  import cabac_ref_pkg::*;

  localparam int NBITS = 160000;
  localparam int NWORDS = NBITS / 16;
  localparam int COLS = 120;

  logic               clk = 1'b0;
  logic               rst_n = 1'b1;
  logic               cabac_mode = 1'b0;
  logic               bs_flush = 1'b0;
  logic               bs_mem_req;
  logic               bs_mem_valid = 1'b0;
  logic [15:0]        bs_mem_data = '0;
  logic               ue_start = 1'b0, ue_sgn = 1'b0;
  logic               ue_busy, ue_done, ue_err;
  logic signed [31:0] ue_value;
  logic               slice_init = 1'b0;
  logic [1:0]         table_sel = '0;
  logic [5:0]         slice_qp = 6'd29;
  logic               cabac_ready;
  logic               rom_rd;
  logic [ROM_AW-1:0]  rom_addr;
  logic [15:0]        rom_data = '0;
  logic               req_valid = 1'b0;
  cabac_req_t         req = '0;
  logic               req_ready;
  logic               se_valid;
  logic [7:0]         se_id;
  logic signed [31:0] se_value;
  logic               cib_en = 1'b0, cib_we = 1'b0;
  logic [6:0]         cib_addr = '0;
  logic [66:0]        cib_cabac_wdata = '0, cib_cabac_rdata;
  logic [19:0]        cib_luma_wdata = '0, cib_luma_rdata;
  logic [9:0]         cib_cb_wdata = '0, cib_cr_wdata = '0, cib_cb_rdata, cib_cr_rdata;
  logic [1:0]         cib_mb_type_wdata = '0, cib_mb_type_rdata;
  logic [3:0]         cib_bs_coef_wdata = '0, cib_bs_coef_rdata;
  logic [2:0]         cib_info_wdata = '0, cib_info_rdata;
  logic [31:0]        cnt_bins, cnt_stall, cnt_miss, cnt_hit_switch, cnt_preload;
  logic [31:0]        cnt_writeback, cnt_bypass, cnt_term, cnt_refill;

  h264_parser_top dut (.*);

  bit   sb[NBITS];
  int   waddr = 0;
  int   cyc = 0;
  int   checks = 0, failures = 0;
  int   n_long = 0, n_flush = 0, n_cavlc_buf = 0, n_cabac_buf = 0, n_restart = 0;
  int   n_hdr = 0, n_se = 0;
  int   busy_cycles = 0, idle_in_busy = 0;
  bit   measuring = 0;
  cabac_ref ref_m;

  typedef struct { int id; int v; } exp_t;
  exp_t expq[$];

  always #5 clk = ~clk;

  // Bitstream memory: one 16-bit word per request, answered in the same
  // cycle; a flush jumps to the address set by the test.
  always_comb begin
    for (int i = 0; i < 16; i++) bs_mem_data[15 - i] = sb[(waddr * 16 + i) % NBITS];
  end
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (bs_mem_req && bs_mem_valid && !bs_flush) waddr <= waddr + 1;
    if (rom_rd) rom_data <= rom_word(int'(rom_addr));
  end

  // Decoder occupancy for the rate check.
  always @(posedge clk) begin
    if (measuring && cabac_ready && dut.u_cabac.active) begin
      busy_cycles++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && se_valid) begin
      if (expq.size() == 0) check(0, "CABAC result with nothing outstanding");
      else begin
        exp_t e;
        e = expq.pop_front();
        check(se_id == 8'(e.id) && se_value == e.v,
              $sformatf("CABAC id %0d value %0d, expected id %0d value %0d", se_id, se_value, e.id, e.v));
        n_se++;
      end
    end
  end

  // ---------------------------------------------------------- stream build
  function automatic int put_eg(int p, int code);
    int len, v;
    v = code + 1;
    len = 0;
    while ((v >> len) > 1) len++;
    for (int i = 0; i < len; i++) sb[p + i] = 1'b0;
    for (int i = 0; i <= len; i++) sb[p + len + i] = 1'(v >> (len - i));
    return 2 * len + 1;
  endfunction

  int eg_code[$], eg_sgn[$], eg_len[$];

  function automatic int add_codes(int p, int n, int maxbits);
    int nb, c, l;
    for (int i = 0; i < n; i++) begin
      nb = $urandom_range(0, maxbits);
      c = (1 << nb) - 1 + $urandom_range(0, (1 << nb) - 1);
      l = put_eg(p, c);
      eg_code.push_back(c);
      eg_sgn.push_back($urandom_range(0, 1));
      eg_len.push_back(l);
      p += l;
    end
    return p;
  endfunction

  // ---------------------------------------------------------- operations
  task automatic jump(int word);
    @(negedge clk);
    bs_flush = 1'b1;
    waddr = word;
    @(negedge clk);
    bs_flush = 1'b0;
    n_flush++;
  endtask

  task automatic decode_codes(int n);
    int c, s, v, t;
    for (int i = 0; i < n; i++) begin
      c = eg_code.pop_front();
      s = eg_sgn.pop_front();
      @(negedge clk);
      ue_start = 1'b1;
      ue_sgn = 1'(s);
      @(negedge clk);
      ue_start = 1'b0;
      t = 0;
      while (!ue_done && t < 200) begin
        @(negedge clk);
        t++;
      end
      v = !s ? c : (c % 2) ? (c + 1) / 2 : -(c / 2);
      check(ue_done && !ue_err && ue_value == v,
            $sformatf("Exp-Golomb code: value %0d, expected %0d", ue_value, v));
      if (eg_len.pop_front() >= 27) n_long++;
      n_hdr++;
    end
  endtask

  task automatic start_slice(int ts, int qp, int bitpos, bit fresh);
    @(negedge clk);
    table_sel = 2'(ts);
    slice_qp = 6'(qp);
    slice_init = 1'b1;
    @(negedge clk);
    slice_init = 1'b0;
    while (!cabac_ready) @(negedge clk);
    if (fresh) ref_m.ptr = bitpos;
    ref_m.init_ctx(ts, qp);
    ref_m.init_engine();
  endtask

  task automatic drain();
    int n;
    n = 0;
    while (expq.size() != 0 && n < 10000) begin
      @(negedge clk);
      n++;
    end
    repeat (2) @(negedge clk);
  endtask

  task automatic cabac_slice(int nreq, int ts, int qp, int bitpos);
    cabac_req_t r;
    int b0, s0, c0;
    start_slice(ts, qp, bitpos, 1'b1);
    for (int n = 0; n < nreq; n++) begin
      r = rand_req(n & 255, (n % 500 < 250) ? 5 : 90);
      if (r.kind == BZ_TERM && $urandom_range(0, 7) != 0) r.kind = BZ_FLAG;
      // End of slice: when the reference shows that a terminate bin would
      // decode as 1 here, send one (end_of_slice_flag) now and then.
      if (ref_m.offset >= ref_m.range - 2 && n > 500 && $urandom_range(0, 1)) begin
        r = '0;
        r.id = 8'(n);
        r.kind = BZ_TERM;
      end
      // Rate measurement over one stretch of back-to-back requests.
      if (n == 100) begin
        b0 = int'(cnt_bins); s0 = int'(cnt_stall); c0 = busy_cycles;
        measuring = 1;
      end
      ref_m.term_hit = 1'b0;
      @(negedge clk);
      req = r;
      req_valid = 1'b1;
      #1;
      while (!req_ready) begin
        @(negedge clk);
        #1;
      end
      expq.push_back('{id: int'(r.id), v: ref_m.decode(r)});
      @(posedge clk);
      #1;
      req_valid = 1'b0;
      if (n == 400) begin
        @(negedge clk);
        drain();
        measuring = 0;
        check(int'(cnt_bins) - b0 + int'(cnt_stall) - s0 <= busy_cycles - c0 + 1 &&
              int'(cnt_bins) - b0 + int'(cnt_stall) - s0 >= busy_cycles - c0 - 60,
              $sformatf("rate: %0d bins + %0d stalls in %0d busy cycles",
                        int'(cnt_bins) - b0, int'(cnt_stall) - s0, busy_cycles - c0));
        $display("rate stretch: %0d bins, %0d stalls, %0d busy cycles",
                 int'(cnt_bins) - b0, int'(cnt_stall) - s0, busy_cycles - c0);
      end
      if (ref_m.term_hit) begin
        drain();
        n_restart++;
        start_slice(ts, qp, 0, 1'b0);
      end
    end
    drain();
  endtask

  task automatic fill_cib(bit mode);
    logic [66:0] sh_d [COLS];
    logic [8:0]  sh_t [COLS];
    int a;
    for (int i = 0; i < COLS; i++) begin
      @(negedge clk);
      cib_en = 1'b1; cib_we = 1'b1; cib_addr = 7'(i);
      cib_cabac_wdata = {3'($urandom), $urandom, $urandom};
      cib_luma_wdata = 20'($urandom); cib_cb_wdata = 10'($urandom); cib_cr_wdata = 10'($urandom);
      cib_mb_type_wdata = 2'($urandom); cib_bs_coef_wdata = 4'($urandom); cib_info_wdata = 3'($urandom);
      sh_d[i] = mode ? cib_cabac_wdata : {27'd0, cib_luma_wdata, cib_cb_wdata, cib_cr_wdata};
      sh_t[i] = {cib_info_wdata, cib_bs_coef_wdata, cib_mb_type_wdata};
    end
    for (int i = 0; i < COLS; i++) begin
      a = $urandom_range(0, COLS - 1);
      @(negedge clk);
      cib_en = 1'b1; cib_we = 1'b0; cib_addr = 7'(a);
      @(negedge clk);
      cib_en = 1'b0;
      if (mode) check(cib_cabac_rdata == sh_d[a], "common info buffer, CABAC word");
      else check({cib_luma_rdata, cib_cb_rdata, cib_cr_rdata} == sh_d[a][39:0],
                 "common info buffer, CAVLC word");
      check({cib_info_rdata, cib_bs_coef_rdata, cib_mb_type_rdata} == sh_t[a],
            "common info buffer, type word");
    end
    if (mode) n_cabac_buf++; else n_cavlc_buf++;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, s1_cabac, s2_word, s3_word, s3_cabac, s1_end;
    // Slice 1: header codes, then CABAC data.
    for (int i = 0; i < NBITS; i++) sb[i] = 1'($urandom_range(0, 1));
    p = add_codes(0, 12, 8);
    s1_cabac = p;
    s2_word = 3200;                      // bit 51200
    p = add_codes(s2_word * 16, 400, 14);
    s3_word = (p + 15) / 16 + 1;
    p = add_codes(s3_word * 16, 12, 8);
    s3_cabac = p;
    ref_m = new(NBITS);
    for (int i = 0; i < NBITS; i++) ref_m.bits[i] = sb[i];

    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    repeat (2) @(negedge clk);
    bs_mem_valid = 1'b1;

    // ---- slice 1 (CABAC)
    cabac_mode = 1'b1;
    decode_codes(12);
    cabac_slice(1500, 0, 29, s1_cabac);
    s1_end = ref_m.ptr;
    check(s1_end < s2_word * 16, "slice 1 stays inside its area");
    fill_cib(1'b1);

    // ---- slice 2 (CAVLC): prediction syntax through the Exp-Golomb path
    jump(s2_word);
    cabac_mode = 1'b0;
    decode_codes(400);
    fill_cib(1'b0);

    // ---- slice 3 (CABAC)
    jump(s3_word);
    cabac_mode = 1'b1;
    decode_codes(12);
    cabac_slice(1500, 2, 36, s3_cabac);
    fill_cib(1'b1);

    check(expq.size() == 0, "all CABAC results returned");
    check(cnt_miss > 0 && cnt_stall > 0, "context miss with stall happened");
    check(cnt_hit_switch > 0, "CMRS hit switch happened");
    check(cnt_preload > 0, "preload happened");
    check(cnt_writeback > 0, "write-back happened");
    check(cnt_bypass > 0, "bypass bin happened");
    check(cnt_term > 0, "terminate bin happened");
    check(cnt_refill > 0, "bitstream refill happened");
    check(n_flush >= 2, "buffer flush happened");
    check(n_long > 0, "27-bit or longer codeword happened");
    check(n_cavlc_buf > 0 && n_cabac_buf > 0, "common info buffer used in both modes");
    check(n_restart > 0, "slice restart after a terminate bin happened");
    $display("codes=%0d long=%0d se=%0d bins=%0d stall=%0d miss=%0d hitsw=%0d preload=%0d wb=%0d bypass=%0d term=%0d refill=%0d flush=%0d restart=%0d cycles=%0d",
             n_hdr, n_long, n_se, cnt_bins, cnt_stall, cnt_miss, cnt_hit_switch, cnt_preload,
             cnt_writeback, cnt_bypass, cnt_term, cnt_refill, n_flush, n_restart, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
