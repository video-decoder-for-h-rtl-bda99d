// h264_parser_top: entropy-decoding front end (bitstream parser) of the
// Main Profile H.264/AVC decoder.
//
// One line bitstream buffer feeds two decoders that never work at the same
// time: the Exp-Golomb decoder of the UVLC path (headers, and prediction
// syntax in CAVLC mode) and the CABAC decoder (all macroblock-layer syntax
// in CABAC mode). Whichever decoder is busy gets the buffer's window and
// drives its consume port; the Exp-Golomb decoder has priority, and the
// CABAC decoder sees the window as not valid while it runs. The common
// info line buffer, shared by CAVLC and CABAC for the top-neighbour data,
// sits beside them with its ports brought out, as do the interfaces of the
// parts around the parser: the syntax-element controller that issues the
// requests, the CAVLC decoder and neighbour buffer that use the line
// buffer, the context init ROM and the bitstream memory.
// Interfaces:
//   bitstream memory : bs_mem_req/bs_mem_valid/bs_mem_data, 16-bit words
//   UVLC             : ue_start/ue_sgn -> ue_done/ue_value (two cycles)
//   CABAC            : slice_init, then valid/ready requests -> se_valid
//   init ROM         : rom_rd/rom_addr -> rom_data one cycle later
// Parameters are the document's frame-width figures (120 macroblock
// columns). The arbitration rule is this design's choice.
module h264_parser_top
  import cabac_pkg::*;
#(
  parameter int unsigned MB_COLS = 120
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cabac_mode,
  // bitstream memory
  input  logic               bs_flush,
  output logic               bs_mem_req,
  input  logic               bs_mem_valid,
  input  logic [15:0]        bs_mem_data,
  // UVLC Exp-Golomb decoding
  input  logic               ue_start,
  input  logic               ue_sgn,
  output logic               ue_busy,
  output logic               ue_done,
  output logic               ue_err,
  output logic signed [31:0] ue_value,
  // CABAC
  input  logic               slice_init,
  input  logic [1:0]         table_sel,
  input  logic [5:0]         slice_qp,
  output logic               cabac_ready,
  output logic               rom_rd,
  output logic [ROM_AW-1:0]  rom_addr,
  input  logic [15:0]        rom_data,
  input  logic               req_valid,
  input  cabac_req_t         req,
  output logic               req_ready,
  output logic               se_valid,
  output logic [7:0]         se_id,
  output logic signed [31:0] se_value,
  // common info line buffer
  input  logic               cib_en,
  input  logic               cib_we,
  input  logic [$clog2(MB_COLS)-1:0] cib_addr,
  input  logic [66:0]        cib_cabac_wdata,
  output logic [66:0]        cib_cabac_rdata,
  input  logic [19:0]        cib_luma_wdata,
  input  logic [9:0]         cib_cb_wdata,
  input  logic [9:0]         cib_cr_wdata,
  output logic [19:0]        cib_luma_rdata,
  output logic [9:0]         cib_cb_rdata,
  output logic [9:0]         cib_cr_rdata,
  input  logic [1:0]         cib_mb_type_wdata,
  input  logic [3:0]         cib_bs_coef_wdata,
  input  logic [2:0]         cib_info_wdata,
  output logic [1:0]         cib_mb_type_rdata,
  output logic [3:0]         cib_bs_coef_rdata,
  output logic [2:0]         cib_info_rdata,
  // event counters
  output logic [31:0]        cnt_bins,
  output logic [31:0]        cnt_stall,
  output logic [31:0]        cnt_miss,
  output logic [31:0]        cnt_hit_switch,
  output logic [31:0]        cnt_preload,
  output logic [31:0]        cnt_writeback,
  output logic [31:0]        cnt_bypass,
  output logic [31:0]        cnt_term,
  output logic [31:0]        cnt_refill
);

  logic [31:0] window;
  logic        win_valid;
  logic        consume;
  logic [4:0]  consume_n;
  logic        eg_consume;
  logic [4:0]  eg_consume_n;
  logic [3:0]  cb_consume_n;
  logic        eg_sel;

  line_bitstream_buffer u_bsb (
    .clk       (clk),
    .rst_n     (rst_n),
    .flush     (bs_flush),
    .mem_req   (bs_mem_req),
    .mem_valid (bs_mem_valid),
    .mem_data  (bs_mem_data),
    .window    (window),
    .valid     (win_valid),
    .consume   (consume),
    .consume_n (consume_n),
    .cnt_refill(cnt_refill)
  );

  // The Exp-Golomb decoder owns the window while it is busy or starting.
  assign eg_sel = ue_busy || ue_start;

  expgolomb_dec u_eg (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (ue_start),
    .sgn      (ue_sgn),
    .window   (window),
    .win_valid(win_valid),
    .consume  (eg_consume),
    .consume_n(eg_consume_n),
    .busy     (ue_busy),
    .done     (ue_done),
    .err      (ue_err),
    .value    (ue_value)
  );

  cabac_decoder u_cabac (
    .clk           (clk),
    .rst_n         (rst_n),
    .slice_init    (slice_init),
    .table_sel     (table_sel),
    .slice_qp      (slice_qp),
    .ready         (cabac_ready),
    .rom_rd        (rom_rd),
    .rom_addr      (rom_addr),
    .rom_data      (rom_data),
    .req_valid     (req_valid),
    .req           (req),
    .req_ready     (req_ready),
    .se_valid      (se_valid),
    .se_id         (se_id),
    .se_value      (se_value),
    .bs_window     (window),
    .bs_valid      (win_valid && !eg_sel),
    .bs_consume    (cb_consume_n),
    .cnt_bins      (cnt_bins),
    .cnt_stall     (cnt_stall),
    .cnt_miss      (cnt_miss),
    .cnt_hit_switch(cnt_hit_switch),
    .cnt_preload   (cnt_preload),
    .cnt_writeback (cnt_writeback),
    .cnt_bypass    (cnt_bypass),
    .cnt_term      (cnt_term)
  );

  always_comb begin
    if (eg_sel) begin
      consume   = eg_consume;
      consume_n = eg_consume_n;
    end else begin
      consume   = (cb_consume_n != 4'd0);
      consume_n = 5'(cb_consume_n);
    end
  end

  common_info_line_buffer #(.MB_COLS(MB_COLS)) u_cib (
    .clk             (clk),
    .cabac_mode      (cabac_mode),
    .en              (cib_en),
    .we              (cib_we),
    .addr            (cib_addr),
    .cabac_wdata     (cib_cabac_wdata),
    .cabac_rdata     (cib_cabac_rdata),
    .luma_wdata      (cib_luma_wdata),
    .cb_wdata        (cib_cb_wdata),
    .cr_wdata        (cib_cr_wdata),
    .luma_rdata      (cib_luma_rdata),
    .cb_rdata        (cib_cb_rdata),
    .cr_rdata        (cib_cr_rdata),
    .mb_type_wdata   (cib_mb_type_wdata),
    .bs_coef_wdata   (cib_bs_coef_wdata),
    .cabac_info_wdata(cib_info_wdata),
    .mb_type_rdata   (cib_mb_type_rdata),
    .bs_coef_rdata   (cib_bs_coef_rdata),
    .cabac_info_rdata(cib_info_rdata)
  );

endmodule
