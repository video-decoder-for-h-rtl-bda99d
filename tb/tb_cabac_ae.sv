// tb_cabac_ae: random test of the arithmetic decoding engine against the
// sequential reference decoder.
//
// A random bitstream feeds the engine's 32-bit window; the stream pointer
// advances by the engine's `consume` output. After the initial offset load,
// random decision bins (with random models), bypass bins and terminate bins
// are decoded one per cycle, with random idle cycles in between. After each
// bin the bin value, the updated model, range, offset and stream pointer
// are compared with the reference. A terminate bin of 1 restarts both
// engines from the current stream position. One bin per cycle is the rate
// the engine must sustain, so every fire is checked in the very next cycle.
`timescale 1ns/1ps
module tb_cabac_ae;
  import cabac_pkg::*;
  import cabac_ref_pkg::*;

  localparam int NBITS = 60000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        init = 1'b0, fire = 1'b0;
  ae_mode_e    mode = AE_DECISION;
  model_t      model_in = '0, model_out;
  logic [31:0] window;
  logic        bin;
  logic [3:0]  consume;
  logic [8:0]  range_q, offset_q;

  bit stream[NBITS];
  int ptr = 0;
  int checks = 0, failures = 0;
  int n_lps = 0, n_mps = 0, n_byp = 0, n_term1 = 0;
  cabac_ref ref_m;

  cabac_ae dut (.clk(clk), .rst_n(rst_n), .init(init), .fire(fire), .mode(mode),
                .model_in(model_in), .window(window), .bin(bin), .model_out(model_out),
                .consume(consume), .range_q(range_q), .offset_q(offset_q));

  always #5 clk = ~clk;
  always_ff @(posedge clk) ptr <= ptr + int'(consume);
  always_comb for (int i = 0; i < 32; i++) window[31 - i] = stream[(ptr + i) % NBITS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_init();
    @(negedge clk);
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    ref_m.init_engine();
    check(range_q == 9'd510 && int'(offset_q) == ref_m.offset && ptr == ref_m.ptr,
          "engine initialisation");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, sel;
    logic [6:0] m_exp;
    ref_m = new(NBITS);
    for (int i = 0; i < NBITS; i++) begin
      stream[i] = 1'($urandom_range(0, 1));
      ref_m.bits[i] = stream[i];
    end
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    do_init();
    for (int n = 0; n < 20000 && ref_m.ptr < NBITS - 64; n++) begin
      @(negedge clk);
      sel = $urandom_range(0, 19);
      fire = 1'b1;
      if (sel < 15) begin
        mode     = AE_DECISION;
        model_in = 7'($urandom);
        if (sel < 5) model_in[5:0] = 6'($urandom_range(0, 8));  // LPS likely
        ref_m.ctx[0] = model_in;
      end else if (sel < 19) begin
        mode = AE_BYPASS;
      end else begin
        mode = AE_TERMINATE;
      end
      #1;
      case (mode)
        AE_DECISION: begin
          b = ref_m.decision(0);
          if (b != int'(model_in[6])) n_lps++; else n_mps++;
        end
        AE_BYPASS: begin
          b = ref_m.bypass();
          n_byp++;
        end
        default: b = ref_m.term();
      endcase
      m_exp = ref_m.ctx[0];
      check(int'(bin) == b, $sformatf("bin %0d mode %0d, expected %0d", bin, mode, b));
      if (mode == AE_DECISION) check(model_out == m_exp,
                                     $sformatf("model %h, expected %h", model_out, m_exp));
      @(negedge clk);
      fire = 1'b0;
      if (mode == AE_TERMINATE && b == 1) begin
        n_term1++;
        do_init();
      end else begin
        check(int'(range_q) == ref_m.range && int'(offset_q) == ref_m.offset,
              $sformatf("range/offset %0d/%0d, expected %0d/%0d", range_q, offset_q,
                        ref_m.range, ref_m.offset));
        check(ptr == ref_m.ptr, $sformatf("stream pointer %0d, expected %0d", ptr, ref_m.ptr));
      end
      if ($urandom_range(0, 3) == 0) begin
        // back-to-back: next bin straight away
      end
    end
    check(n_lps > 0 && n_mps > 0 && n_byp > 0, "LPS, MPS and bypass bins all occurred");
    $display("lps=%0d mps=%0d bypass=%0d term1=%0d", n_lps, n_mps, n_byp, n_term1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
