// line_bitstream_buffer: 48-bit two-stage line buffer for the bitstream.
//
// Replaces a 128-bit circular buffer with a wide output multiplexer. The
// buffer is a 32-bit first stage, filled from the bitstream memory one
// 16-bit word at a time, and a 16-bit second stage that always holds the
// oldest 16 bits. Together they act as one 48-bit shift register whose
// valid bits are kept left-aligned: window[31:16] is the 16-bit stage,
// window[15:0] the top of the 32-bit stage. Consuming n bits shifts n bits
// out of the 16-bit stage and n bits from the 32-bit stage into it. When
// the 32-bit stage holds fewer than 16 valid bits (fewer than 32 valid in
// total) one memory word is requested and shifted in behind the valid bits.
// Interface: mem_req/mem_valid/mem_data move 16-bit words in (a word is
// taken in any cycle where both are high); window is usable when `valid`
// (32 or more valid bits) and `consume_n` (0..16) bits are dropped in each
// cycle with `consume`. flush empties the buffer (slice start).
// The 48-bit size, the 16+32 split and the refill rule follow the document;
// the 16-bit memory word and consuming up to 16 bits per cycle are this
// design's choices.
module line_bitstream_buffer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  output logic        mem_req,
  input  logic        mem_valid,
  input  logic [15:0] mem_data,
  output logic [31:0] window,
  output logic        valid,
  input  logic        consume,
  input  logic [4:0]  consume_n,
  output logic [31:0] cnt_refill
);

  logic [15:0] stage2;     // 16-bit stage: oldest bits
  logic [31:0] stage1;     // 32-bit stage, left-aligned
  logic [5:0]  cnt;        // valid bits in {stage2, stage1}, 0..48

  logic [47:0] sh;
  logic [5:0]  cnt_c;
  logic [63:0] ins;
  logic        take;

  assign window  = {stage2, stage1[31:16]};
  assign valid   = (cnt >= 6'd32);
  assign mem_req = (cnt < 6'd32);
  assign take    = mem_req && mem_valid;

  always_comb begin
    logic [4:0] n;
    n     = (consume && valid) ? consume_n : 5'd0;
    sh    = {stage2, stage1} << n;
    cnt_c = cnt - 6'(n);
    // The new word goes right behind the valid bits (bit 47-cnt_c down).
    ins   = {48'd0, mem_data} << (6'd32 - cnt_c);
    if (take) sh = sh | ins[47:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage2     <= '0;
      stage1     <= '0;
      cnt        <= '0;
      cnt_refill <= '0;
    end else if (flush) begin
      stage2 <= '0;
      stage1 <= '0;
      cnt    <= '0;
    end else begin
      {stage2, stage1} <= sh;
      cnt <= cnt_c + (take ? 6'd16 : 6'd0);
      if (take) cnt_refill <= cnt_refill + 32'd1;
    end
  end

  a_consume_ok: assert property (@(posedge clk) disable iff (!rst_n)
    consume |-> valid && consume_n <= 5'd16);

endmodule
