// cabac_ae: single-bin binary arithmetic decoding engine.
//
// Holds the 9-bit codIRange and codIOffset registers and decodes one bin per
// cycle in which `fire` is high, in one of three modes:
//   decision  - the LPS range comes from the model's state and range[7:6];
//               offset < range - rLPS gives the MPS, otherwise the LPS, and
//               the state/MPS of the model are updated (model_out);
//   bypass    - one stream bit is shifted into the offset and compared with
//               the range (the document's equivalent halving view);
//   terminate - range is reduced by 2; offset >= range gives bin 1.
// Renormalisation is done in the same cycle: the number of leading zeros of
// the 9-bit new range gives the shift, and that many bits are taken from
// the top of the bitstream window. `consume` reports the bits used so the
// bitstream buffer can advance; it is 9 on `init`, which loads the offset
// from the first nine stream bits and sets the range to 0x1FE.
// Timing: bin, model_out and consume are combinational in the firing cycle;
// range and offset update on the following clock edge. The single-bin
// engine and the one-cycle decision path follow the document; doing the
// whole renormalisation in one cycle with a leading-zero count is this
// design's choice.
module cabac_ae
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,       // load offset from stream, range = 0x1FE
  input  logic        fire,       // decode one bin this cycle
  input  ae_mode_e    mode,
  input  model_t      model_in,   // {mps, pstate}, used in decision mode
  input  logic [31:0] window,     // next stream bits, MSB first
  output logic        bin,
  output model_t      model_out,  // updated model (decision mode)
  output logic [3:0]  consume,    // stream bits used this cycle
  output logic [8:0]  range_q,
  output logic [8:0]  offset_q
);

  logic [7:0] rlps;
  logic [5:0] st_mps, st_lps;
  logic [8:0] rmps;
  logic [8:0] range_n, offset_n;   // before renormalisation
  logic [8:0] range_d, offset_d;   // register inputs
  logic [3:0] shift;
  logic [9:0] obyp;                // bypass: offset*2 + next bit

  assign obyp = {offset_q, window[31]};

  cabac_lps_lut u_lut (
    .pstate  (m_state(model_in)),
    .q       (range_q[7:6]),
    .rlps    (rlps),
    .next_mps(st_mps),
    .next_lps(st_lps)
  );

  assign rmps = range_q - {1'b0, rlps};

  // Leading zeros of a 9-bit range (the renormalisation shift).
  function automatic logic [3:0] lz9(logic [8:0] r);
    logic [3:0] n;
    n = 4'd9;
    for (int i = 0; i <= 8; i++) begin
      if (r[i]) n = 4'(8 - i);
    end
    return n;
  endfunction

  always_comb begin
    bin       = 1'b0;
    model_out = model_in;
    range_n   = range_q;
    offset_n  = offset_q;
    unique case (mode)
      AE_DECISION: begin
        if (offset_q >= rmps) begin
          bin       = ~m_mps(model_in);
          range_n   = {1'b0, rlps};
          offset_n  = offset_q - rmps;
          model_out = {(m_state(model_in) == 6'd0) ? ~m_mps(model_in)
                                                   : m_mps(model_in), st_lps};
        end else begin
          bin       = m_mps(model_in);
          range_n   = rmps;
          model_out = {m_mps(model_in), st_mps};
        end
      end
      AE_BYPASS: begin
        // Offset is shifted left by one with the next stream bit; the range
        // is unchanged (equivalent to halving the range). The shifted
        // offset needs ten bits since the offset itself can reach 509.
        if (obyp >= {1'b0, range_q}) begin
          bin      = 1'b1;
          offset_n = 9'(obyp - {1'b0, range_q});
        end else begin
          offset_n = obyp[8:0];
        end
      end
      default: begin  // AE_TERMINATE
        range_n = range_q - 9'd2;
        if (offset_q >= range_n) bin = 1'b1;
      end
    endcase
  end

  always_comb begin
    range_d  = range_q;
    offset_d = offset_q;
    shift    = 4'd0;
    consume  = 4'd0;
    if (init) begin
      range_d  = 9'h1FE;
      offset_d = window[31:23];
      consume  = 4'd9;
    end else if (fire) begin
      unique case (mode)
        AE_BYPASS: begin
          offset_d = offset_n;
          consume  = 4'd1;
        end
        AE_TERMINATE: begin
          range_d  = range_n;
          offset_d = offset_q;
          if (!bin && !range_n[8]) begin
            range_d  = {range_n[7:0], 1'b0};
            offset_d = {offset_q[7:0], window[31]};
            consume  = 4'd1;
          end
        end
        default: begin
          shift    = lz9(range_n);
          range_d  = range_n << shift;
          offset_d = 9'((18'(offset_n) << shift) | 18'(window[31:23] >> (4'd9 - shift)));
          consume  = shift;
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      range_q  <= 9'h1FE;
      offset_q <= 9'd0;
    end else begin
      range_q  <= range_d;
      offset_q <= offset_d;
    end
  end

endmodule
