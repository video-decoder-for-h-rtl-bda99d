// common_info_line_buffer: top-neighbour (nB) line buffer shared by the
// CAVLC and CABAC entropy decoders.
//
// A slice is entropy coded either with CAVLC or with CABAC, never both, so
// the neighbour information of the macroblock row above is kept in one
// pair of single-port SRAMs, one entry per macroblock column (120 for a
// 1920-pel wide frame):
//   data memory, 67 bits : in CABAC mode the decoder's 67-bit neighbour
//                          word; in CAVLC mode the packed coefficient-count
//                          words {LumaLevel[19:0], Cb[9:0], Cr[9:0]} in bits
//                          [39:0], the remaining bits written as zero;
//   type memory, 9 bits  : {cabac_info[2:0], bs_coef[3:0], mb_type[1:0]},
//                          used in both modes.
// `cabac_mode` selects which client's write data goes to the data memory
// and how the read word is presented; the type memory is common.
// Interface: one access per cycle on `addr` (macroblock column); en/we as
// for a single-port SRAM, read data valid after the clock edge.
// The two memory sizes, the sharing and the field widths follow the
// document; the bit order inside the words is this design's choice.
module common_info_line_buffer #(
  parameter int unsigned MB_COLS = 120,
  parameter int unsigned DATA_W  = 67,
  parameter int unsigned TYPE_W  = 9,
  parameter int unsigned AW      = $clog2(MB_COLS)
) (
  input  logic              clk,
  input  logic              cabac_mode,
  input  logic              en,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  // CABAC client
  input  logic [DATA_W-1:0] cabac_wdata,
  output logic [DATA_W-1:0] cabac_rdata,
  // CAVLC client
  input  logic [19:0]       luma_wdata,
  input  logic [9:0]        cb_wdata,
  input  logic [9:0]        cr_wdata,
  output logic [19:0]       luma_rdata,
  output logic [9:0]        cb_rdata,
  output logic [9:0]        cr_rdata,
  // common type word
  input  logic [1:0]        mb_type_wdata,
  input  logic [3:0]        bs_coef_wdata,
  input  logic [2:0]        cabac_info_wdata,
  output logic [1:0]        mb_type_rdata,
  output logic [3:0]        bs_coef_rdata,
  output logic [2:0]        cabac_info_rdata
);

  logic [DATA_W-1:0] d_wdata, d_rdata;
  logic [TYPE_W-1:0] t_wdata, t_rdata;

  assign d_wdata = cabac_mode ? cabac_wdata
                              : DATA_W'({luma_wdata, cb_wdata, cr_wdata});
  assign t_wdata = TYPE_W'({cabac_info_wdata, bs_coef_wdata, mb_type_wdata});

  sp_ram #(.DEPTH(MB_COLS), .WIDTH(DATA_W)) u_data (
    .clk(clk), .en(en), .we(we), .addr(addr), .wdata(d_wdata), .rdata(d_rdata)
  );

  sp_ram #(.DEPTH(MB_COLS), .WIDTH(TYPE_W)) u_type (
    .clk(clk), .en(en), .we(we), .addr(addr), .wdata(t_wdata), .rdata(t_rdata)
  );

  assign cabac_rdata = cabac_mode ? d_rdata : '0;
  assign {luma_rdata, cb_rdata, cr_rdata} = cabac_mode ? 40'd0 : d_rdata[39:0];
  assign {cabac_info_rdata, bs_coef_rdata, mb_type_rdata} = t_rdata[8:0];

endmodule
