// tb_cabac_ctx_mem: random test of the 112 x 28 context memory. Every group
// is first written, then random reads and writes (also to the same address
// in one cycle) are compared with a shadow array. Read data must appear
// exactly one cycle after the read is issued and hold while no read is
// issued.
`timescale 1ns/1ps
module tb_cabac_ctx_mem;
  localparam int DEPTH = 112;
  localparam int WIDTH = 28;
  localparam int AW    = 7;

  logic             clk = 1'b0;
  logic             rd_en = 1'b0, wr_en = 1'b0;
  logic [AW-1:0]    rd_addr = '0, wr_addr = '0;
  logic [WIDTH-1:0] rd_data, wr_data = '0;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] expect_q;
  logic             exp_valid = 1'b0;
  int checks = 0, failures = 0;

  cabac_ctx_mem dut (.clk(clk), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
                     .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en   = 1'b1;
      wr_addr = AW'(a);
      wr_data = WIDTH'($urandom);
      shadow[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // Check the read issued in the previous cycle (or the held value).
      if (exp_valid) check(rd_data == expect_q,
                           $sformatf("read data %h, expected %h", rd_data, expect_q));
      rd_en   = ($urandom_range(0, 2) != 0);
      rd_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_en   = ($urandom_range(0, 1) != 0);
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : AW'($urandom_range(0, DEPTH - 1));
      wr_data = WIDTH'($urandom);
      if (rd_en) begin
        expect_q  = shadow[rd_addr];   // old data on a same-address write
        exp_valid = 1'b1;
      end
      if (wr_en) shadow[wr_addr] = wr_data;
    end
    @(negedge clk);
    check(rd_data == expect_q, "last read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
