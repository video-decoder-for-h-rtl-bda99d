// cabac_decoder: three-stage pipelined CABAC decoder with two context model
// register sets (CMRS).
//
// A syntax-element controller hands over one decode request per syntax
// element (binarisation kind, context group base, neighbour-derived bin-0
// increment); the decoder returns the element's value. Bins flow through
//   LOAD_MEM - a 28-bit group of four models is read from the context
//              memory into one of the two CMRS (only on a miss);
//   CTXIDX   - the model for the bin is selected inside a CMRS;
//   DEC/MATCH- the arithmetic engine decodes the bin with that model,
//              updates the model in place, and the matching FSM decides
//              whether the element is complete. In the same cycle the
//              context of the next bin (of this element, or bin 0 of the
//              next request) is computed and looked up in both CMRS tags.
// A hit in either CMRS costs nothing: the next bin is decoded in the next
// cycle, so one bin per cycle is sustained. A miss issues the memory read
// at once, loads the group into the CMRS not in use and costs one stall
// cycle; the first bin after an idle period therefore starts two cycles
// after the request (LOAD_MEM, CTXIDX). A CMRS is written back to memory in
// the cycle after the decoder leaves it, and keeps its contents, so a later
// return to that group is again a hit. A request may name a second group
// (pre_en/pre_grp): when its own group misses, that group is read into the
// other CMRS in the following cycle, as for the last_significant_coeff_flag
// group behind significant_coeff_flag.
// Slice start: slice_init runs the init engine over the (m,n) ROM (about
// 450 cycles), then the engine loads its offset from the first nine bits.
// Interfaces: valid/ready request; se_valid pulses one cycle after the last
// bin with the echoed id and value; the bitstream window is read when
// bs_valid is high and bs_consume reports the bits used in that cycle.
// The stage split, CMRS pair, one-cycle switch penalty, write-back and
// preload follow the document; the request format, tag compare and
// replacement rule (always the CMRS not in use) are this design's choices.
module cabac_decoder
  import cabac_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // slice control
  input  logic               slice_init,
  input  logic [1:0]         table_sel,
  input  logic [5:0]         slice_qp,
  output logic               ready,       // initialised, accepting requests
  // context init ROM
  output logic               rom_rd,
  output logic [ROM_AW-1:0]  rom_addr,
  input  logic [15:0]        rom_data,
  // syntax element requests and results
  input  logic               req_valid,
  input  cabac_req_t         req,
  output logic               req_ready,
  output logic               se_valid,
  output logic [7:0]         se_id,
  output logic signed [31:0] se_value,
  // bitstream
  input  logic [31:0]        bs_window,
  input  logic               bs_valid,
  output logic [3:0]         bs_consume,
  // event counters
  output logic [31:0]        cnt_bins,
  output logic [31:0]        cnt_stall,
  output logic [31:0]        cnt_miss,
  output logic [31:0]        cnt_hit_switch,
  output logic [31:0]        cnt_preload,
  output logic [31:0]        cnt_writeback,
  output logic [31:0]        cnt_bypass,
  output logic [31:0]        cnt_term
);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_ENG, S_RUN} state_e;
  state_e state;

  localparam bin_pos_t POS0 = '{part: PART_MAIN, idx: 6'd0, b1: 1'b0, b3: 1'b0};

  // ---------------------------------------------------------------- CMRS
  model_t      cm    [2][4];
  grp_t        tag   [2];
  logic [1:0]  tval;
  logic [1:0]  dirty;

  // ------------------------------------------------------- pipeline regs
  logic        active;
  cabac_req_t  cur_req;
  logic        cur_set;
  logic [1:0]  cur_slot;
  ae_mode_e    cur_mode;
  logic        ctx_rdy;      // the bin in CTXIDX can be decoded next cycle
  logic        ld_pend;      // context memory data arrives this cycle
  logic        ld_set;
  logic        pre_pend;     // issue the preload read this cycle
  grp_t        pre_grp_q;
  logic        wb_pend;
  logic        wb_set;

  // ------------------------------------------------------------ memory
  logic                mem_rd_en, mem_wr_en;
  grp_t                mem_rd_addr, mem_wr_addr;
  logic [GROUP_W-1:0]  mem_rd_data, mem_wr_data;

  cabac_ctx_mem #(.DEPTH(NUM_GROUPS), .WIDTH(GROUP_W)) u_mem (
    .clk    (clk),
    .rd_en  (mem_rd_en),
    .rd_addr(mem_rd_addr),
    .rd_data(mem_rd_data),
    .wr_en  (mem_wr_en),
    .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data)
  );

  // --------------------------------------------------------- init engine
  logic               ini_start, ini_busy, ini_done, ini_wr;
  grp_t               ini_addr;
  logic [GROUP_W-1:0] ini_data;

  assign ini_start = slice_init;

  cabac_ctx_init u_init (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (ini_start),
    .table_sel  (table_sel),
    .slice_qp   (slice_qp),
    .rom_rd     (rom_rd),
    .rom_addr   (rom_addr),
    .rom_data   (rom_data),
    .mem_wr_en  (ini_wr),
    .mem_wr_addr(ini_addr),
    .mem_wr_data(ini_data),
    .busy       (ini_busy),
    .done       (ini_done)
  );

  // ----------------------------------------------------- DEC/MATCH stage
  logic               dec_fire, ae_init;
  logic               bin;
  model_t             model_in, model_out;
  logic [8:0]         range_q, offset_q;
  logic               bm_match;
  logic signed [31:0] bm_value;
  bin_pos_t           bm_nxt, bm_pos;
  logic               done_se, take_req;

  assign dec_fire = (state == S_RUN) && active && ctx_rdy && bs_valid;
  assign ae_init  = (state == S_ENG) && bs_valid;
  assign model_in = cm[cur_set][cur_slot];

  cabac_ae u_ae (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (ae_init),
    .fire     (dec_fire),
    .mode     (cur_mode),
    .model_in (model_in),
    .window   (bs_window),
    .bin      (bin),
    .model_out(model_out),
    .consume  (bs_consume),
    .range_q  (range_q),
    .offset_q (offset_q)
  );

  assign done_se   = dec_fire && bm_match;
  assign req_ready = (state == S_RUN) && (!active || done_se) && !slice_init;
  assign take_req  = req_valid && req_ready;
  assign ready     = (state == S_RUN);

  cabac_bin_match u_match (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (take_req),
    .req      (cur_req),
    .bin_valid(dec_fire),
    .bin      (bin),
    .match    (bm_match),
    .value    (bm_value),
    .nxt      (bm_nxt),
    .pos      (bm_pos)
  );

  // ------------------------------------------- next-bin context lookup
  logic        lk_valid, lk_first;
  cabac_req_t  lk_req;
  bin_pos_t    lk_pos;
  ae_mode_e    lk_mode;
  grp_t        lk_grp;
  logic [1:0]  lk_slot;
  logic        hit0, hit1, lk_hit, lk_hset, lk_miss;
  logic        victim;
  logic        nxt_set;
  logic        do_pre;

  always_comb begin
    lk_valid = 1'b0;
    lk_first = 1'b0;
    lk_req   = cur_req;
    lk_pos   = bm_nxt;
    if (dec_fire && !bm_match) begin
      lk_valid = 1'b1;
    end else if (take_req) begin
      lk_valid = 1'b1;
      lk_first = 1'b1;
      lk_req   = req;
      lk_pos   = POS0;
    end
  end

  cabac_ctxinc u_ctxinc (
    .req (lk_req),
    .pos (lk_pos),
    .mode(lk_mode),
    .grp (lk_grp),
    .slot(lk_slot)
  );

  assign hit0    = tval[0] && (tag[0] == lk_grp);
  assign hit1    = tval[1] && (tag[1] == lk_grp);
  assign lk_hit  = hit0 | hit1;
  assign lk_hset = hit1;
  assign victim  = ~cur_set;
  assign lk_miss = lk_valid && (lk_mode == AE_DECISION) && !lk_hit;

  always_comb begin
    nxt_set = cur_set;
    if (lk_valid && lk_mode == AE_DECISION) nxt_set = lk_hit ? lk_hset : victim;
  end

  // Preload the hinted group into the other CMRS after a miss on bin 0,
  // unless it is already there or is the group being loaded.
  assign do_pre = lk_miss && lk_first && lk_req.pre_en &&
                  (lk_req.pre_grp != lk_grp) &&
                  !(tval[cur_set] && tag[cur_set] == lk_req.pre_grp);

  // Memory port use: a miss read, or the preload read one cycle later.
  always_comb begin
    mem_rd_en   = 1'b0;
    mem_rd_addr = lk_grp;
    if (lk_miss) begin
      mem_rd_en = 1'b1;
    end else if (pre_pend) begin
      mem_rd_en   = 1'b1;
      mem_rd_addr = pre_grp_q;
    end
  end

  always_comb begin
    if (state == S_INIT) begin
      mem_wr_en   = ini_wr;
      mem_wr_addr = ini_addr;
      mem_wr_data = ini_data;
    end else begin
      mem_wr_en   = wb_pend;
      mem_wr_addr = tag[wb_set];
      mem_wr_data = {cm[wb_set][3], cm[wb_set][2], cm[wb_set][1], cm[wb_set][0]};
    end
  end

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      active    <= 1'b0;
      cur_req   <= '0;
      cur_set   <= 1'b0;
      cur_slot  <= '0;
      cur_mode  <= AE_DECISION;
      ctx_rdy   <= 1'b0;
      ld_pend   <= 1'b0;
      ld_set    <= 1'b0;
      pre_pend  <= 1'b0;
      pre_grp_q <= '0;
      wb_pend   <= 1'b0;
      wb_set    <= 1'b0;
      tval      <= '0;
      dirty     <= '0;
      tag[0]    <= '0;
      tag[1]    <= '0;
      for (int s = 0; s < 2; s++)
        for (int i = 0; i < 4; i++) cm[s][i] <= '0;
      se_valid  <= 1'b0;
      se_id     <= '0;
      se_value  <= '0;
    end else begin
      se_valid <= 1'b0;
      wb_pend  <= 1'b0;
      pre_pend <= 1'b0;
      ld_pend  <= 1'b0;

      unique case (state)
        S_IDLE: ;
        S_INIT: if (ini_done) state <= S_ENG;
        S_ENG:  if (bs_valid) state <= S_RUN;
        default: ;
      endcase

      if (slice_init) begin
        state   <= S_INIT;
        active  <= 1'b0;
        ctx_rdy <= 1'b0;
        tval    <= '0;
        dirty   <= '0;
      end else if (state == S_RUN) begin
        // DEC/MATCH: model update
        if (dec_fire && cur_mode == AE_DECISION) begin
          cm[cur_set][cur_slot] <= model_out;
          dirty[cur_set]        <= 1'b1;
        end
        if (done_se) begin
          se_valid <= 1'b1;
          se_id    <= cur_req.id;
          se_value <= bm_value;
          if (!take_req) begin
            active  <= 1'b0;
            ctx_rdy <= 1'b0;
          end
        end
        if (take_req) begin
          active  <= 1'b1;
          cur_req <= req;
        end

        // Write-back of the CMRS just left.
        if (wb_pend) dirty[wb_set] <= 1'b0;
        if (nxt_set != cur_set &&
            (dirty[cur_set] || (dec_fire && cur_mode == AE_DECISION))) begin
          wb_pend <= 1'b1;
          wb_set  <= cur_set;
        end

        // CTXIDX: register the next bin's context.
        if (lk_valid) begin
          cur_mode <= lk_mode;
          cur_slot <= lk_slot;
          cur_set  <= nxt_set;
          if (lk_miss) begin
            tag[victim]  <= lk_grp;
            tval[victim] <= 1'b1;
            ld_pend      <= 1'b1;
            ld_set       <= victim;
            ctx_rdy      <= 1'b0;
          end else begin
            ctx_rdy <= 1'b1;
          end
          if (do_pre) begin
            pre_pend  <= 1'b1;
            pre_grp_q <= lk_req.pre_grp;
          end
        end

        // LOAD_MEM: capture a group read from memory.
        if (ld_pend) begin
          {cm[ld_set][3], cm[ld_set][2], cm[ld_set][1], cm[ld_set][0]} <= mem_rd_data;
          dirty[ld_set] <= 1'b0;
          if (ld_set == cur_set) ctx_rdy <= 1'b1;
        end
        if (pre_pend) begin
          tag[~cur_set]  <= pre_grp_q;
          tval[~cur_set] <= 1'b1;
          ld_pend        <= 1'b1;
          ld_set         <= ~cur_set;
        end
      end
    end
  end

  // ------------------------------------------------------------ counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_bins       <= '0;
      cnt_stall      <= '0;
      cnt_miss       <= '0;
      cnt_hit_switch <= '0;
      cnt_preload    <= '0;
      cnt_writeback  <= '0;
      cnt_bypass     <= '0;
      cnt_term       <= '0;
    end else begin
      if (dec_fire) cnt_bins <= cnt_bins + 32'd1;
      if (state == S_RUN && active && !ctx_rdy) cnt_stall <= cnt_stall + 32'd1;
      if (state == S_RUN && lk_miss) cnt_miss <= cnt_miss + 32'd1;
      if (state == S_RUN && lk_valid && lk_mode == AE_DECISION && lk_hit &&
          lk_hset != cur_set)
        cnt_hit_switch <= cnt_hit_switch + 32'd1;
      if (pre_pend) cnt_preload <= cnt_preload + 32'd1;
      if (mem_wr_en && state == S_RUN) cnt_writeback <= cnt_writeback + 32'd1;
      if (dec_fire && cur_mode == AE_BYPASS) cnt_bypass <= cnt_bypass + 32'd1;
      if (dec_fire && cur_mode == AE_TERMINATE) cnt_term <= cnt_term + 32'd1;
    end
  end

  // Handshake rules.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready && !slice_init |=> req_valid);
  a_one_read: assert property (@(posedge clk) disable iff (!rst_n)
    !(lk_miss && pre_pend));

endmodule
