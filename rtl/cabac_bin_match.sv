// cabac_bin_match: bin matching (de-binarisation) state machines.
//
// Receives decoded bins one at a time and detects when the bin string of
// the current syntax element is complete, producing its value. Each
// binarisation has its own small FSM rather than a lookup on the whole bin
// string, so `match` depends only on the state and the current bin:
//   FLAG / BYPASS / TERM : one bin, value = bin
//   FL    : cmax bins, least significant bin first
//   TU    : ones terminated by a zero or by cmax ones (unary: cmax = 63);
//           with sgn set the count k is mapped to (-1)^(k+1)*ceil(k/2)
//   UEG   : TU prefix with cMax = uCoff (cmax), then a k-th order
//           Exp-Golomb suffix (unary part, then k fixed bins MSB first),
//           then a sign bin when sgn is set and the value is not zero
//   mb_type I : states bin0..bin6 of the table-mapping FSM; I_NxN = 0,
//           I_PCM = 25, I_16x16 = 1 + pred + 4*chroma + 12*luma
//   mb_type P : bins P0..P2 (P types 0..3), or 1 then the I FSM (+5)
//   sub_mb_type P : 1 -> 0, 00 -> 1, 011 -> 2, 010 -> 3
// Interface: `start` (re)initialises for the kind in `req`; each cycle with
// `bin_valid` consumes `bin`. match/value are combinational in that cycle;
// `nxt` is the position of the following bin when match is low, and `pos`
// is the registered position of the bin about to be decoded. `start` takes
// priority over `bin_valid` in the same cycle (the previous element ended).
// The FSM method and the mb_type state chart follow the document; the
// other FSMs are written in the same style by this design.
module cabac_bin_match
  import cabac_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  cabac_req_t         req,
  input  logic               bin_valid,
  input  logic               bin,
  output logic               match,
  output logic signed [31:0] value,
  output bin_pos_t           nxt,
  output bin_pos_t           pos
);

  logic [31:0] acc, acc_n;     // partial value
  logic        egfix, egfix_n; // EG suffix: fixed-bin phase
  logic [4:0]  kk, kk_n;       // EG order / bins left in fixed phase

  localparam bin_pos_t POS0 = '{part: PART_MAIN, idx: 6'd0, b1: 1'b0, b3: 1'b0};

  function automatic logic signed [31:0] tu_map(logic [31:0] k, logic sgn);
    if (!sgn)      return $signed(k);
    else if (k[0]) return $signed((k + 32'd1) >> 1);
    else           return -$signed(k >> 1);
  endfunction

  function automatic logic [31:0] mbi_val(logic [31:0] a);
    // a[0] luma, a[2:1] chroma, a[4:3] pred
    return 32'd1 + 32'(a[4:3]) + 32'(a[2:1]) * 32'd4 + 32'(a[0]) * 32'd12;
  endfunction

  bin_pos_t           adv;     // same part, next index
  logic               sfx_done;
  logic signed [31:0] off;
  logic               fin;

  always_comb begin
    sfx_done = 1'b0;
    off      = (req.kind == BZ_MBTYPE_P) ? 32'sd5 : 32'sd0;
    fin      = 1'b0;
    adv      = pos;
    adv.idx  = pos.idx + 6'd1;
    if (pos.idx == 6'd1) adv.b1 = bin;
    if (pos.idx == 6'd3) adv.b3 = bin;

    match   = 1'b0;
    value   = '0;
    nxt     = adv;
    acc_n   = acc;
    egfix_n = egfix;
    kk_n    = kk;

    unique case (req.kind)
      BZ_FLAG, BZ_BYPASS, BZ_TERM: begin
        match = 1'b1;
        value = 32'(bin);
      end

      BZ_FL: begin
        acc_n = acc | (32'(bin) << pos.idx);
        if (pos.idx == req.cmax - 6'd1) begin
          match = 1'b1;
          value = $signed(acc_n);
        end
      end

      BZ_TU: begin
        if (!bin) begin
          match = 1'b1;
          value = tu_map(32'(pos.idx), req.sgn);
        end else if (pos.idx == req.cmax - 6'd1) begin
          match = 1'b1;
          value = tu_map(32'(req.cmax), req.sgn);
        end
      end

      BZ_UEG: begin
        unique case (pos.part)
          PART_MAIN: begin
            if (!bin) begin
              if (req.sgn && pos.idx != 6'd0) begin
                acc_n = 32'(pos.idx);
                nxt   = '{part: PART_SIGN, idx: 6'd0, b1: 1'b0, b3: 1'b0};
              end else begin
                match = 1'b1;
                value = $signed(32'(pos.idx));
              end
            end else if (pos.idx == req.cmax - 6'd1) begin
              acc_n   = 32'(req.cmax);
              kk_n    = 5'(req.k);
              egfix_n = 1'b0;
              nxt     = '{part: PART_SUFFIX, idx: 6'd0, b1: 1'b0, b3: 1'b0};
            end
          end
          PART_SUFFIX: begin
            if (!egfix) begin
              if (bin) begin
                acc_n = acc + (32'd1 << kk);
                kk_n  = kk + 5'd1;
              end else if (kk == 5'd0) begin
                sfx_done = 1'b1;
              end else begin
                egfix_n = 1'b1;
              end
            end else begin
              acc_n = acc + (32'(bin) << (kk - 5'd1));
              kk_n  = kk - 5'd1;
              if (kk == 5'd1) sfx_done = 1'b1;
            end
            if (sfx_done) begin
              if (req.sgn) begin
                nxt = '{part: PART_SIGN, idx: 6'd0, b1: 1'b0, b3: 1'b0};
              end else begin
                match = 1'b1;
                value = $signed(acc_n);
              end
            end
          end
          default: begin  // PART_SIGN
            match = 1'b1;
            value = bin ? -$signed(acc) : $signed(acc);
          end
        endcase
      end

      BZ_MBTYPE_I, BZ_MBTYPE_P: begin
        if (req.kind == BZ_MBTYPE_P && pos.part == PART_MAIN) begin
          // P prefix: P_bin0..P_bin2
          unique case (pos.idx)
            6'd0: begin
              if (bin) nxt = '{part: PART_SUFFIX, idx: 6'd0, b1: 1'b0, b3: 1'b0};
            end
            6'd1: ;
            default: begin
              match = 1'b1;
              unique case ({pos.b1, bin})
                2'b00:   value = 32'sd0;
                2'b11:   value = 32'sd1;
                2'b10:   value = 32'sd2;
                default: value = 32'sd3;
              endcase
            end
          endcase
        end else begin
          // I_bin0..I_bin6 (also the intra suffix of a P mb_type)
          unique case (pos.idx)
            6'd0: begin
              if (!bin) begin
                match = 1'b1;
                value = off;
              end
              acc_n = '0;
            end
            6'd1: begin
              if (bin) begin
                match = 1'b1;
                value = off + 32'sd25;
              end
            end
            6'd2: acc_n[0] = bin;
            6'd3: ;
            6'd4: begin
              if (pos.b3) acc_n[2:1] = {bin, ~bin};  // chroma 1 or 2
              else        acc_n[4]   = bin;
            end
            6'd5: begin
              if (pos.b3) acc_n[4] = bin;
              else begin
                acc_n[3] = bin;
                fin      = 1'b1;
              end
            end
            default: begin
              acc_n[3] = bin;
              fin      = 1'b1;
            end
          endcase
          if (fin) begin
            match = 1'b1;
            value = off + $signed(mbi_val(acc_n));
          end
        end
      end

      BZ_SUBMB_P: begin
        unique case (pos.idx)
          6'd0: if (bin) begin
            match = 1'b1;
            value = 32'sd0;
          end
          6'd1: if (!bin) begin
            match = 1'b1;
            value = 32'sd1;
          end
          default: begin
            match = 1'b1;
            value = bin ? 32'sd2 : 32'sd3;
          end
        endcase
      end

      default: begin
        match = 1'b1;
        value = 32'(bin);
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos   <= POS0;
      acc   <= '0;
      egfix <= 1'b0;
      kk    <= '0;
    end else if (start) begin
      pos   <= POS0;
      acc   <= '0;
      egfix <= 1'b0;
      kk    <= '0;
    end else if (bin_valid) begin
      pos   <= nxt;
      acc   <= acc_n;
      egfix <= egfix_n;
      kk    <= kk_n;
    end
  end

endmodule
