// tb_common_info_line_buffer: test of the line buffer shared by the CAVLC
// and CABAC paths.
//
// One full line of 120 macroblock columns is written in CABAC mode with
// random 67-bit neighbour words and random type words, read back, then
// overwritten in CAVLC mode with random luma/Cb/Cr coefficient counts and
// read back again. Read data appears one cycle after the read; in each
// mode the other client's read port must show zero. The type word fields
// are checked in both modes.
`timescale 1ns/1ps
module tb_common_info_line_buffer;
  localparam int COLS = 120;

  logic        clk = 1'b0;
  logic        cabac_mode = 1'b1;
  logic        en = 1'b0, we = 1'b0;
  logic [6:0]  addr = '0;
  logic [66:0] cabac_wdata = '0, cabac_rdata;
  logic [19:0] luma_wdata = '0, luma_rdata;
  logic [9:0]  cb_wdata = '0, cr_wdata = '0, cb_rdata, cr_rdata;
  logic [1:0]  mb_type_wdata = '0, mb_type_rdata;
  logic [3:0]  bs_coef_wdata = '0, bs_coef_rdata;
  logic [2:0]  info_wdata = '0, info_rdata;
  logic [66:0] sh_d [COLS];
  logic [8:0]  sh_t [COLS];
  int checks = 0, failures = 0;

  common_info_line_buffer dut (
    .clk(clk), .cabac_mode(cabac_mode), .en(en), .we(we), .addr(addr),
    .cabac_wdata(cabac_wdata), .cabac_rdata(cabac_rdata),
    .luma_wdata(luma_wdata), .cb_wdata(cb_wdata), .cr_wdata(cr_wdata),
    .luma_rdata(luma_rdata), .cb_rdata(cb_rdata), .cr_rdata(cr_rdata),
    .mb_type_wdata(mb_type_wdata), .bs_coef_wdata(bs_coef_wdata),
    .cabac_info_wdata(info_wdata), .mb_type_rdata(mb_type_rdata),
    .bs_coef_rdata(bs_coef_rdata), .cabac_info_rdata(info_rdata));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_line(bit mode);
    cabac_mode = mode;
    for (int a = 0; a < COLS; a++) begin
      @(negedge clk);
      en = 1'b1;
      we = 1'b1;
      addr = 7'(a);
      cabac_wdata   = {3'($urandom), $urandom, $urandom};
      luma_wdata    = 20'($urandom);
      cb_wdata      = 10'($urandom);
      cr_wdata      = 10'($urandom);
      mb_type_wdata = 2'($urandom);
      bs_coef_wdata = 4'($urandom);
      info_wdata    = 3'($urandom);
      sh_d[a] = mode ? cabac_wdata : {27'd0, luma_wdata, cb_wdata, cr_wdata};
      sh_t[a] = {info_wdata, bs_coef_wdata, mb_type_wdata};
    end
    @(negedge clk);
    en = 1'b0;
    we = 1'b0;
  endtask

  task automatic read_line();
    for (int n = 0; n < 2 * COLS; n++) begin
      int a;
      a = $urandom_range(0, COLS - 1);
      @(negedge clk);
      en = 1'b1;
      we = 1'b0;
      addr = 7'(a);
      @(negedge clk);
      en = 1'b0;
      if (cabac_mode) begin
        check(cabac_rdata == sh_d[a], $sformatf("CABAC word %0d: %h, expected %h", a, cabac_rdata, sh_d[a]));
        check({luma_rdata, cb_rdata, cr_rdata} == '0, "CAVLC port idle in CABAC mode");
      end else begin
        check({luma_rdata, cb_rdata, cr_rdata} == sh_d[a][39:0],
              $sformatf("CAVLC word %0d: %h, expected %h", a, {luma_rdata, cb_rdata, cr_rdata}, sh_d[a][39:0]));
        check(cabac_rdata == '0, "CABAC port idle in CAVLC mode");
      end
      check({info_rdata, bs_coef_rdata, mb_type_rdata} == sh_t[a],
            $sformatf("type word %0d: %h, expected %h", a, {info_rdata, bs_coef_rdata, mb_type_rdata}, sh_t[a]));
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write_line(1'b1);
    read_line();
    write_line(1'b0);
    read_line();
    write_line(1'b1);
    read_line();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
