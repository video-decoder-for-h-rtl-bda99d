// tb_cabac_decoder: self-checking test of the pipelined CABAC decoder.
//
// Part 1 replays the three-element sequence of the pipeline timing chart:
// se0 (3 bins, group 0), se1 (2 bins, group 1), se2 (1 bin, group 0). The
// results must appear 5, 8 and 9 cycles after se0 is accepted (two stall
// cycles at the start, one for the switch to group 1, none for the return
// to group 0), with 2 misses, 1 hit switch and 2 write-backs.
// Part 2 sends random requests of every binarisation over a random
// bitstream with random gaps in the bitstream and in the requests, and
// compares each value with a sequential reference decoder. A terminate
// bin decoded as 1 (end of slice) is followed by a new slice start on both.
// It also checks the bin count, that every stall cycle belongs to a miss,
// that the stream pointer ends where the reference's does, and that
// preloads, hit switches, write-backs, bypass and terminate bins occurred.
`timescale 1ns/1ps
module tb_cabac_decoder;
  import cabac_pkg::*;
  import cabac_ref_pkg::*;

  localparam int NBITS = 200000;
  localparam int NREQ  = 3000;

  logic               clk = 1'b0;
  logic               rst_n = 1'b1;   // falls at 1 ns: a real reset edge
  logic               slice_init = 1'b0;
  logic [1:0]         table_sel = 2'd1;
  logic [5:0]         slice_qp = 6'd29;
  logic               ready;
  logic               rom_rd;
  logic [ROM_AW-1:0]  rom_addr;
  logic [15:0]        rom_data;
  logic               req_valid = 1'b0;
  cabac_req_t         req = '0;
  logic               req_ready;
  logic               se_valid;
  logic [7:0]         se_id;
  logic signed [31:0] se_value;
  logic [31:0]        bs_window;
  logic               bs_valid = 1'b1;
  logic [3:0]         bs_consume;
  logic [31:0]        c_bins, c_stall, c_miss, c_hsw, c_pre, c_wb, c_byp, c_term;

  int checks = 0, failures = 0;
  int cyc = 0;
  bit stream[NBITS];
  int ptr = 0;
  cabac_ref ref_m;

  typedef struct { int id; int v; } exp_t;
  exp_t expq[$];
  int   vcycles[$];

  cabac_decoder dut (
    .clk(clk), .rst_n(rst_n), .slice_init(slice_init), .table_sel(table_sel),
    .slice_qp(slice_qp), .ready(ready), .rom_rd(rom_rd), .rom_addr(rom_addr),
    .rom_data(rom_data), .req_valid(req_valid), .req(req), .req_ready(req_ready),
    .se_valid(se_valid), .se_id(se_id), .se_value(se_value),
    .bs_window(bs_window), .bs_valid(bs_valid), .bs_consume(bs_consume),
    .cnt_bins(c_bins), .cnt_stall(c_stall), .cnt_miss(c_miss),
    .cnt_hit_switch(c_hsw), .cnt_preload(c_pre), .cnt_writeback(c_wb),
    .cnt_bypass(c_byp), .cnt_term(c_term)
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cyc      <= cyc + 1;
    rom_data <= rom_word(int'(rom_addr));
    ptr      <= ptr + int'(bs_consume);
  end

  always_comb begin
    for (int i = 0; i < 32; i++) bs_window[31 - i] = stream[(ptr + i) % NBITS];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Results.
  always @(negedge clk) begin
    if (rst_n && se_valid) begin
      vcycles.push_back(cyc);
      if (expq.size() == 0) begin
        check(0, "result with nothing outstanding");
      end else begin
        exp_t e;
        e = expq.pop_front();
        check(se_id == 8'(e.id) && se_value == e.v,
              $sformatf("id %0d value %0d, expected id %0d value %0d",
                        se_id, se_value, e.id, e.v));
      end
    end
  end

  task automatic start_slice();
    @(negedge clk);
    slice_init = 1'b1;
    @(negedge clk);
    slice_init = 1'b0;
    while (!ready) @(negedge clk);
    ref_m.init_ctx(int'(table_sel), int'(slice_qp));
    ref_m.init_engine();
  endtask

  // Send one request; the reference decodes it when it is accepted.
  task automatic send(cabac_req_t r, output int acc_cyc);
    @(negedge clk);
    req = r;
    req_valid = 1'b1;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    acc_cyc = cyc;
    expq.push_back('{id: int'(r.id), v: ref_m.decode(r)});
    @(posedge clk);
    #1;
    req_valid = 1'b0;
  endtask

  task automatic drain();
    int n;
    n = 0;
    while (expq.size() != 0 && n < 10000) begin
      @(negedge clk);
      n++;
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cabac_req_t r;
    int t0, t, nterm_slices;
    int m0, h0, w0, s0, b0;

    #1 rst_n = 1'b0;
    ref_m = new(NBITS);
    for (int i = 0; i < NBITS; i++) begin
      stream[i] = 1'($urandom_range(0, 1));
      ref_m.bits[i] = stream[i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- Part 1: the timing chart sequence
    start_slice();
    m0 = int'(c_miss); h0 = int'(c_hsw); w0 = int'(c_wb); s0 = int'(c_stall);
    b0 = int'(c_bins);
    vcycles.delete();
    fork
      begin
        r = '0; r.id = 8'd1; r.kind = BZ_FL; r.cmax = 6'd3; r.grp_base = 7'd0;
        send(r, t0);
        r = '0; r.id = 8'd2; r.kind = BZ_FL; r.cmax = 6'd2; r.grp_base = 7'd1;
        send(r, t);
        r = '0; r.id = 8'd3; r.kind = BZ_FLAG; r.grp_base = 7'd0; r.inc0 = 4'd2;
        send(r, t);
      end
    join
    drain();
    check(vcycles.size() == 3, "three results in the timing sequence");
    if (vcycles.size() == 3) begin
      check(vcycles[0] - t0 == 5, $sformatf("se0 done at +%0d, expected +5", vcycles[0] - t0));
      check(vcycles[1] - t0 == 8, $sformatf("se1 done at +%0d, expected +8", vcycles[1] - t0));
      check(vcycles[2] - t0 == 9, $sformatf("se2 done at +%0d, expected +9", vcycles[2] - t0));
    end
    check(int'(c_miss) - m0 == 2, "two misses in the timing sequence");
    check(int'(c_hsw) - h0 == 1, "one hit switch in the timing sequence");
    check(int'(c_wb) - w0 == 2, "two write-backs in the timing sequence");
    check(int'(c_stall) - s0 == 2, "two stall cycles counted in the timing sequence");
    check(int'(c_bins) - b0 == 6, "six bins in the timing sequence");

    // ---------------- Part 2: random requests
    nterm_slices = 0;
    fork
      begin : gaps
        forever begin
          @(negedge clk);
          bs_valid = ($urandom_range(0, 9) != 0);
        end
      end
      begin
        for (int n = 0; n < NREQ; n++) begin
          r = rand_req(n & 255, (n < NREQ / 2) ? 6 : 90);
          if (r.kind == BZ_TERM && $urandom_range(0, 3) != 0) r.kind = BZ_FLAG;
          ref_m.term_hit = 1'b0;
          send(r, t);
          if (ref_m.term_hit) begin
            drain();
            nterm_slices++;
            start_slice();
          end
          if ($urandom_range(0, 7) == 0) repeat ($urandom_range(1, 4)) @(negedge clk);
        end
        drain();
        disable gaps;
      end
    join
    bs_valid = 1'b1;
    repeat (3) @(negedge clk);

    check(expq.size() == 0, "all results returned");
    check(int'(c_bins) == ref_m.nbins,
          $sformatf("bin count %0d, reference %0d", c_bins, ref_m.nbins));
    check(c_stall == c_miss, $sformatf("stall cycles %0d equal misses %0d", c_stall, c_miss));
    check(ptr == ref_m.ptr, $sformatf("stream pointer %0d, reference %0d", ptr, ref_m.ptr));
    check(c_pre > 0, "preloads happened");
    check(c_hsw > 0, "hit switches happened");
    check(c_wb > 0, "write-backs happened");
    check(c_byp > 0, "bypass bins happened");
    check(c_term > 0, "terminate bins happened");
    $display("bins=%0d stall=%0d miss=%0d hitsw=%0d preload=%0d wb=%0d byp=%0d term=%0d slices=%0d cycles=%0d",
             c_bins, c_stall, c_miss, c_hsw, c_pre, c_wb, c_byp, c_term, nterm_slices, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
