// cabac_ctxinc: ctxIdxInc generator (model selector) for the next bin.
//
// Combinational. From the syntax element being decoded (its request) and
// the position of the next bin in its bin string, it decides how the bin is
// decoded (decision, bypass or terminate) and, for a decision bin, which
// context model is used, as a (group, slot) pair:
//   group = grp_base + ctxIdxInc[3:2], slot = ctxIdxInc[1:0].
// The bin-0 increment that depends on the left (nA) and top (nB)
// neighbours arrives precomputed in the request (inc0). Increments that
// depend on the bin index and on earlier bins are formed here:
//   FLAG, FL      : inc0 for every bin
//   TU, UEG prefix: inc0 for bin 0, min(inc1 + binIdx - 1, inc_max) after
//   UEG suffix/sign, BYPASS : bypass;  TERM : terminate
//   mb_type I     : 0:inc0 1:term 2:3 3:4 4:(b3?5:6) 5:(b3?6:7) 6:7
//   mb_type P     : prefix 0:0 1:1 2:(b1?3:2); intra suffix in grp_base2
//                   0:0 1:term 2:1 3:2 4:(b3?2:3) 5,6:3
//   sub_mb_type P : binIdx
// The suffix model with increment 0 is the same model as the prefix model
// with increment 3; as the document allows, it is kept only in the prefix
// group (grp_base, slot 3). The increment rules are the standard's; the
// split between precomputed neighbour terms and per-bin rules is this
// design's choice.
module cabac_ctxinc
  import cabac_pkg::*;
(
  input  cabac_req_t req,
  input  bin_pos_t   pos,
  output ae_mode_e   mode,
  output grp_t       grp,
  output logic [1:0] slot
);

  logic [3:0] inc;
  grp_t       base;
  logic [5:0] lin;   // inc1 + binIdx - 1, before the limit

  always_comb begin
    mode = AE_DECISION;
    base = req.grp_base;
    inc  = req.inc0;
    lin  = 6'(req.inc1) + pos.idx - 6'd1;
    unique case (req.kind)
      BZ_FLAG, BZ_FL: inc = req.inc0;
      BZ_BYPASS:      mode = AE_BYPASS;
      BZ_TERM:        mode = AE_TERMINATE;
      BZ_TU, BZ_UEG: begin
        if (pos.part != PART_MAIN) begin
          mode = AE_BYPASS;
        end else if (pos.idx == 6'd0) begin
          inc = req.inc0;
        end else if (lin > 6'(req.inc_max)) begin
          inc = req.inc_max;
        end else begin
          inc = lin[3:0];
        end
      end
      BZ_MBTYPE_I: begin
        unique case (pos.idx)
          6'd0:    inc = req.inc0;
          6'd1:    mode = AE_TERMINATE;
          6'd2:    inc = 4'd3;
          6'd3:    inc = 4'd4;
          6'd4:    inc = pos.b3 ? 4'd5 : 4'd6;
          6'd5:    inc = pos.b3 ? 4'd6 : 4'd7;
          default: inc = 4'd7;
        endcase
      end
      BZ_MBTYPE_P: begin
        if (pos.part == PART_MAIN) begin
          unique case (pos.idx)
            6'd0:    inc = 4'd0;
            6'd1:    inc = 4'd1;
            default: inc = pos.b1 ? 4'd3 : 4'd2;
          endcase
        end else begin
          base = req.grp_base2;
          unique case (pos.idx)
            6'd0: begin
              base = req.grp_base;   // shared model, kept with the prefix
              inc  = 4'd3;
            end
            6'd1:    mode = AE_TERMINATE;
            6'd2:    inc = 4'd1;
            6'd3:    inc = 4'd2;
            6'd4:    inc = pos.b3 ? 4'd2 : 4'd3;
            default: inc = 4'd3;
          endcase
        end
      end
      BZ_SUBMB_P: inc = pos.idx[3:0];
      default:    inc = req.inc0;
    endcase
    grp  = base + grp_t'(inc[3:2]);
    slot = inc[1:0];
  end

endmodule
