// tb_expgolomb_dec: test of the two-cycle Exp-Golomb decoder.
//
// A stream of random ue(v) and se(v) codewords is built here, with code
// numbers of all lengths up to 14 information bits (27-bit codewords, the
// longest a 1920-wide motion vector difference needs) and a few up to 15.
// The decoder reads a 32-bit window over this stream, and the stream
// position advances by its consume output. Each decoded value is compared
// with the encoded one, and the stream position after each code with the
// codeword length. Timing: with the window always valid, `done` must come
// exactly three cycles after `start` (LZ, INFO, result register). A run of
// 16 zeros must raise `err`. Later codes are decoded with random gaps in
// the window's valid signal.
`timescale 1ns/1ps
module tb_expgolomb_dec;
  localparam int NBITS = 200000;

  logic               clk = 1'b0;
  logic               rst_n = 1'b1;
  logic               start = 1'b0;
  logic               sgn = 1'b0;
  logic [31:0]        window;
  logic               win_valid = 1'b1;
  logic               consume;
  logic [4:0]         consume_n;
  logic               busy, done, err;
  logic signed [31:0] value;

  bit stream[NBITS];
  int ptr = 0;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n27 = 0;

  expgolomb_dec dut (.clk(clk), .rst_n(rst_n), .start(start), .sgn(sgn), .window(window),
                     .win_valid(win_valid), .consume(consume), .consume_n(consume_n),
                     .busy(busy), .done(done), .err(err), .value(value));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (consume) ptr <= ptr + int'(consume_n);
  end
  always_comb for (int i = 0; i < 32; i++) window[31 - i] = stream[(ptr + i) % NBITS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Write the codeword for codeNum at position p; returns its length.
  function automatic int put(int p, int code);
    int len, v;
    v = code + 1;
    len = 0;
    while ((v >> len) > 1) len++;
    for (int i = 0; i < len; i++) stream[p + i] = 1'b0;
    for (int i = 0; i <= len; i++) stream[p + len + i] = 1'(v >> (len - i));
    return 2 * len + 1;
  endfunction

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes[3000], sg[3000], lens[3000], starts[3000];
    int p, nb, t0, expv, gaps;
    p = 0;
    for (int i = 0; i < 3000; i++) begin
      nb = $urandom_range(0, 14);
      if (i % 200 == 7) nb = 15;
      codes[i] = (1 << nb) - 1 + $urandom_range(0, (1 << nb) - 1);
      sg[i] = $urandom_range(0, 1);
      starts[i] = p;
      lens[i] = put(p, codes[i]);
      if (lens[i] >= 27) n27++;
      p += lens[i];
    end
    for (int i = 0; i < 20; i++) stream[p + i] = 1'b0;   // error case at the end
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      gaps = (i >= 1500);
      @(negedge clk);
      start = 1'b1;
      sgn = 1'(sg[i]);
      @(negedge clk);
      t0 = cyc - 1;
      start = 1'b0;
      while (!done && cyc - t0 < 100) begin
        if (gaps) win_valid = ($urandom_range(0, 2) != 0);
        @(negedge clk);
      end
      win_valid = 1'b1;
      if (!sg[i]) expv = codes[i];
      else expv = (codes[i] % 2) ? (codes[i] + 1) / 2 : -(codes[i] / 2);
      check(done && !err && value == expv,
            $sformatf("code %0d (len %0d, se %0d): value %0d err %0d, expected %0d",
                      i, lens[i], sg[i], value, err, expv));
      check(ptr == starts[i] + lens[i], $sformatf("code %0d: position %0d, expected %0d",
                                                 i, ptr, starts[i] + lens[i]));
      if (!gaps) check(cyc - t0 == 3, $sformatf("code %0d took %0d cycles, expected 3", i, cyc - t0));
    end
    // 16 leading zeros: error
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (4) begin
      if (done) check(err, "error flag on 16 leading zeros");
      @(negedge clk);
    end
    check(n27 > 50, $sformatf("%0d codewords of 27 bits or more", n27));
    $display("long codewords=%0d", n27);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
