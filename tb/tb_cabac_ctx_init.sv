// tb_cabac_ctx_init: test of the context initialisation engine.
//
// A behavioural ROM answers each read one cycle later with the stand-in
// (m,n) pattern from the reference package. The writes the engine makes
// are collected into a shadow of the 112-group context memory and compared
// group by group with the model the initialisation formula gives for the
// chosen table and slice QP (including QPs above 51, which are clipped).
// The engine reads one ROM entry per cycle, so a full pass must finish
// within 448 + 4 cycles of the start; `done` must pulse exactly once. A
// restart while busy is also tried: the second pass must win.
`timescale 1ns/1ps
module tb_cabac_ctx_init;
  import cabac_pkg::*;
  import cabac_ref_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n = 1'b1;
  logic               start = 1'b0;
  logic [1:0]         table_sel = '0;
  logic [5:0]         slice_qp = '0;
  logic               rom_rd;
  logic [ROM_AW-1:0]  rom_addr;
  logic [15:0]        rom_data = '0;
  logic               mem_wr_en;
  grp_t               mem_wr_addr;
  logic [GROUP_W-1:0] mem_wr_data;
  logic               busy, done;
  logic [GROUP_W-1:0] shadow [NUM_GROUPS];
  logic               written [NUM_GROUPS];
  int checks = 0, failures = 0;
  int cyc = 0, ndone = 0;

  cabac_ctx_init dut (.clk(clk), .rst_n(rst_n), .start(start), .table_sel(table_sel),
                      .slice_qp(slice_qp), .rom_rd(rom_rd), .rom_addr(rom_addr),
                      .rom_data(rom_data), .mem_wr_en(mem_wr_en), .mem_wr_addr(mem_wr_addr),
                      .mem_wr_data(mem_wr_data), .busy(busy), .done(done));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rom_rd) rom_data <= rom_word(int'(rom_addr));
    if (mem_wr_en) begin
      shadow[mem_wr_addr]  <= mem_wr_data;
      written[mem_wr_addr] <= 1'b1;
    end
    if (done) ndone <= ndone + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(int ts, int qp, bit restart);
    int t0, d0, errs;
    logic [GROUP_W-1:0] e;
    for (int g = 0; g < NUM_GROUPS; g++) written[g] = 1'b0;
    @(negedge clk);
    table_sel = 2'(ts);
    slice_qp  = 6'(qp);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (restart) begin
      // start again part-way with other settings
      repeat ($urandom_range(5, 300)) @(negedge clk);
      ts = (ts + 1) % 4;
      qp = $urandom_range(0, 51);
      table_sel = 2'(ts);
      slice_qp  = 6'(qp);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
    end
    t0 = cyc;
    d0 = ndone;
    while (!done && cyc - t0 < 1000) @(negedge clk);
    check(done, "done pulse");
    check(cyc - t0 <= 448 + 4, $sformatf("init took %0d cycles, limit 452", cyc - t0));
    repeat (5) @(negedge clk);
    check(ndone - d0 == 1, $sformatf("done pulsed %0d times", ndone - d0));
    check(!busy, "idle after done");
    errs = 0;
    for (int g = 0; g < NUM_GROUPS; g++) begin
      for (int s = 0; s < 4; s++)
        e[7*s +: 7] = init_model(rom_word(ts * 448 + g * 4 + s), qp);
      if (!written[g] || shadow[g] != e) errs++;
    end
    check(errs == 0, $sformatf("table %0d qp %0d: %0d groups wrong", ts, qp, errs));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    run(0, 29, 1'b0);
    run(3, 0, 1'b0);
    run(2, 51, 1'b0);
    run(1, 63, 1'b0);   // clipped to 51
    for (int i = 0; i < 8; i++) run($urandom_range(0, 3), $urandom_range(0, 51), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
