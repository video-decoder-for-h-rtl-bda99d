// cabac_ctx_init: slice-start initialisation of the context models.
//
// On `start` an address counter walks the selected init table of the (m, n)
// ROM, one 16-bit entry {m[7:0], n[7:0]} (two's complement) per cycle. The
// ROM is organised like the context memory: entries 4g..4g+3 of a table are
// the four models of group g, and table t starts at 448*t. Each entry is
// turned into a model with the standard rule
//   pre = clip3(1, 126, ((m * clip3(0, 51, SliceQP)) >> 4) + n)
//   pre <= 63 : pStateIdx = 63 - pre, valMPS = 0
//   otherwise : pStateIdx = pre - 64, valMPS = 1
// and stored in one of two 28-bit group registers. When a group register
// holds four models it is written to the context memory in the next cycle
// while the other register collects the next group, so the two alternate
// as the document shows for its context model register sets.
// Interface: rom_addr/rom_rd drive an external ROM with one cycle of read
// latency. busy is high from start until the last group is written; done
// pulses once. 448 ROM reads plus 2 cycles of latency per table. A new
// start restarts the walk.
// The ROM contents (the standard's m,n tables) are not part of this block.
// Here the two group registers belong to this block; the document lets the
// init engine use the decoder's own register sets, which this design does
// not share.
module cabac_ctx_init
  import cabac_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [1:0]          table_sel,
  input  logic [5:0]          slice_qp,
  output logic                rom_rd,
  output logic [ROM_AW-1:0]   rom_addr,
  input  logic [15:0]         rom_data,
  output logic                mem_wr_en,
  output grp_t                mem_wr_addr,
  output logic [GROUP_W-1:0]  mem_wr_data,
  output logic                busy,
  output logic                done
);

  localparam int unsigned ENTRIES = NUM_GROUPS * 4;  // 448 per table

  logic [8:0]          cnt;        // entry counter within the table
  logic                rd_act;     // still issuing ROM reads
  logic                rv;         // ROM data valid this cycle
  logic [8:0]          rcnt;       // entry index of the ROM data
  logic [GROUP_W-1:0]  gbuf [2];
  logic                gsel;       // register collecting models
  logic                wpend;
  logic                wsel;
  grp_t                wgrp;
  logic [5:0]          qp_c;
  model_t              mdl;

  assign qp_c = (slice_qp > 6'd51) ? 6'd51 : slice_qp;

  // (m, n) -> model
  always_comb begin
    logic signed [7:0]  m, n;
    logic signed [15:0] prod;
    logic signed [15:0] pre;
    m    = rom_data[15:8];
    n    = rom_data[7:0];
    prod = 16'(m) * $signed({10'd0, qp_c});
    pre  = (prod >>> 4) + 16'(n);
    if (pre < 16'sd1)   pre = 16'sd1;
    if (pre > 16'sd126) pre = 16'sd126;
    if (pre <= 16'sd63) mdl = {1'b0, 6'(16'sd63 - pre)};
    else                mdl = {1'b1, 6'(pre - 16'sd64)};
  end

  assign rom_rd   = rd_act;
  assign rom_addr = ROM_AW'(table_sel) * ROM_AW'(ENTRIES) + ROM_AW'(cnt);

  assign mem_wr_en   = wpend;
  assign mem_wr_addr = wgrp;
  assign mem_wr_data = gbuf[wsel];

  assign busy = rd_act | rv | wpend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      rd_act  <= 1'b0;
      rv      <= 1'b0;
      rcnt    <= '0;
      gsel    <= 1'b0;
      wpend   <= 1'b0;
      wsel    <= 1'b0;
      wgrp    <= '0;
      done    <= 1'b0;
      gbuf[0] <= '0;
      gbuf[1] <= '0;
    end else begin
      done  <= 1'b0;
      wpend <= 1'b0;
      if (start) begin
        cnt    <= '0;
        rd_act <= 1'b1;
        gsel   <= 1'b0;
      end else if (rd_act) begin
        if (cnt == 9'(ENTRIES - 1)) rd_act <= 1'b0;
        else                        cnt    <= cnt + 9'd1;
      end
      rv   <= rd_act;
      rcnt <= cnt;
      if (rv) begin
        gbuf[gsel][7*rcnt[1:0] +: 7] <= mdl;
        if (rcnt[1:0] == 2'd3) begin
          wpend <= 1'b1;
          wsel  <= gsel;
          wgrp  <= grp_t'(rcnt[8:2]);
          gsel  <= ~gsel;
        end
      end
      if (wpend && !rv && !rd_act) done <= 1'b1;
    end
  end

endmodule
