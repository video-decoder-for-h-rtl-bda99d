// tb_line_bitstream_buffer: random test of the 48-bit line bitstream buffer.
//
// A behavioural bitstream memory answers refill requests with consecutive
// 16-bit words of a random stream, with random delays. A random consumer
// takes 0..16 bits whenever the window is valid. In every cycle with the
// window valid, its 32 bits must equal the stream at the consumer's bit
// position. The refill rule is checked against a fill level kept here
// (words delivered x 16 minus bits consumed): a word is requested exactly
// when fewer than 16 valid bits remain in the 32-bit stage, i.e. fewer
// than 32 in the buffer, and the window is valid from 32 bits on. Checked
// timing: with the memory answering at once and the consumer taking 8 bits
// every cycle, the window is never invalid for two cycles in a row (a
// refill is requested only once the level has dropped, so one gap cycle
// can occur); after a flush it is valid again two refill cycles later. The refill counter must equal the number of
// words delivered.
`timescale 1ns/1ps
module tb_line_bitstream_buffer;
  localparam int NWORDS = 8000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        flush = 1'b0;
  logic        mem_req;
  logic        mem_valid = 1'b0;
  logic [15:0] mem_data = '0;
  logic [31:0] window;
  logic        valid;
  logic        consume = 1'b0;
  logic [4:0]  consume_n = '0;
  logic [31:0] cnt_refill;

  logic [15:0] words[NWORDS];
  int wptr = 0;        // next word the memory delivers
  int bptr = 0;        // consumer bit position
  int delivered = 0;
  int checks = 0, failures = 0;
  int fast_mem = 0;    // memory answers every request at once
  int invalid_fast = 0;   // consecutive invalid cycles in the fast phase
  bit was_invalid = 0, prev_inv = 0;
  int level = 0;       // expected valid bits

  line_bitstream_buffer dut (.clk(clk), .rst_n(rst_n), .flush(flush), .mem_req(mem_req),
                             .mem_valid(mem_valid), .mem_data(mem_data), .window(window),
                             .valid(valid), .consume(consume), .consume_n(consume_n),
                             .cnt_refill(cnt_refill));

  always #5 clk = ~clk;

  function automatic bit sbit(int p);
    return words[(p / 16) % NWORDS][15 - (p % 16)];
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive memory and consumer at the negative edge; account at posedge.
  always @(negedge clk) begin
    if (rst_n && !flush) begin
      logic [31:0] exp_w;
      mem_valid = mem_req && (fast_mem != 0 || $urandom_range(0, 2) == 0);
      mem_data  = words[wptr % NWORDS];
      #1;
      check(mem_req == (level < 32) && valid == (level >= 32),
            $sformatf("level %0d: mem_req %0d valid %0d", level, mem_req, valid));
      prev_inv = was_invalid;
      was_invalid = !valid;
      if (valid) begin
        for (int i = 0; i < 32; i++) exp_w[31 - i] = sbit(bptr + i);
        check(window == exp_w, $sformatf("window %h, expected %h at bit %0d", window, exp_w, bptr));
        consume   = fast_mem != 0 || ($urandom_range(0, 4) != 0);
        consume_n = fast_mem != 0 ? 5'd8 : 5'($urandom_range(0, 16));
      end else begin
        consume   = 1'b0;
        consume_n = '0;
        if (fast_mem > 2 && prev_inv) invalid_fast++;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && !flush) begin
      level <= level - ((consume && valid) ? int'(consume_n) : 0) +
               ((mem_valid && mem_req) ? 16 : 0);
      if (consume && valid) bptr <= bptr + int'(consume_n);
      if (mem_valid && mem_req) begin
        wptr <= wptr + 1;
        delivered <= delivered + 1;
      end
      if (fast_mem != 0) fast_mem <= fast_mem + 1;
    end
  end

  initial begin
    int t;
    for (int i = 0; i < NWORDS; i++) words[i] = 16'($urandom);
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    repeat (20000) @(negedge clk);
    // Fast phase: memory always answers, consumer takes 8 bits a cycle.
    fast_mem = 1;
    repeat (2000) @(negedge clk);
    check(invalid_fast == 0, $sformatf("window invalid two cycles running %0d times at 8 bits per cycle", invalid_fast));
    fast_mem = 0;
    check(int'(cnt_refill) == delivered, $sformatf("refills %0d, words %0d", cnt_refill, delivered));
    // Flush: restart the stream at a word boundary.
    @(negedge clk);
    flush = 1'b1;
    consume = 1'b0;
    mem_valid = 1'b0;
    @(negedge clk);
    flush = 1'b0;
    bptr = wptr * 16;
    level = 0;
    fast_mem = 1;
    t = 0;
    #1;
    while (!valid && t < 10) begin
      @(negedge clk);
      #1;
      t++;
    end
    check(t == 2, $sformatf("window valid %0d cycles after flush, expected 2", t));
    fast_mem = 0;
    repeat (2000) @(negedge clk);
    $display("refills=%0d", cnt_refill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
