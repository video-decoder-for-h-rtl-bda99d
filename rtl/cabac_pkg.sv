// cabac_pkg: types and constants shared by the CABAC decoder blocks.
//
// A context model is 7 bits, {valMPS, pStateIdx[5:0]}. Models are kept in
// groups of four; a group is one 28-bit word of the context memory, model
// slot i in bits [7*i +: 7]. A context is addressed by (group, slot), where
// group = group base of the syntax element + ctxIdxInc[3:2] and
// slot = ctxIdxInc[1:0], so that the ctxIdxInc ranges 0-3, 4-7, 8-11 and
// 12-15 of one syntax element fall into consecutive groups. The group
// sizes (4 models, 28 bits, 112 groups) follow the document; the request
// format that the syntax-element controller uses to start a decode is this
// design's own.
package cabac_pkg;

  localparam int unsigned NUM_GROUPS   = 112;  // context memory depth
  localparam int unsigned GRP_AW       = 7;    // group address width
  localparam int unsigned MODEL_W      = 7;    // {mps, pstate}
  localparam int unsigned GROUP_W      = 4 * MODEL_W;  // 28 bits
  localparam int unsigned NUM_TABLES   = 4;    // init tables (m,n)
  localparam int unsigned ROM_AW       = 11;   // 4 tables x 112 groups x 4

  typedef logic [MODEL_W-1:0] model_t;
  typedef logic [GRP_AW-1:0]  grp_t;

  // Arithmetic-engine bin mode.
  typedef enum logic [1:0] {
    AE_DECISION  = 2'd0,
    AE_BYPASS    = 2'd1,
    AE_TERMINATE = 2'd2
  } ae_mode_e;

  // Binarization (matching FSM) selected for a syntax element.
  typedef enum logic [3:0] {
    BZ_FLAG     = 4'd0,  // one context-coded bin
    BZ_BYPASS   = 4'd1,  // one bypass bin (coeff_sign_flag)
    BZ_TERM     = 4'd2,  // one terminate bin (end_of_slice_flag)
    BZ_FL       = 4'd3,  // fixed length, cmax = number of bins, LSB first
    BZ_TU       = 4'd4,  // truncated unary; unary uses cmax = 63
    BZ_UEG      = 4'd5,  // UEGk: TU prefix (cmax=uCoff), EGk suffix, sign
    BZ_MBTYPE_I = 4'd6,  // mb_type in I slice (table mapping FSM)
    BZ_MBTYPE_P = 4'd7,  // mb_type in P slice, prefix + intra suffix
    BZ_SUBMB_P  = 4'd8   // sub_mb_type in P slice
  } bz_kind_e;

  // Which part of a bin string the next bin belongs to.
  typedef enum logic [1:0] {
    PART_MAIN   = 2'd0,  // prefix / only part
    PART_SUFFIX = 2'd1,  // UEGk suffix, or intra suffix of P mb_type
    PART_SIGN   = 2'd2   // UEGk sign
  } part_e;

  // Position of the next bin inside the syntax element's bin string.
  typedef struct packed {
    part_e      part;
    logic [5:0] idx;   // binIdx within the part
    logic       b1;    // bin 1 of the current part, once decoded
    logic       b3;    // bin 3 of the current part, once decoded
  } bin_pos_t;

  // Decode request from the syntax-element controller.
  typedef struct packed {
    logic [7:0] id;        // echoed with the result
    bz_kind_e   kind;
    grp_t       grp_base;  // group holding ctxIdxInc 0..3
    grp_t       grp_base2; // group base of the P mb_type intra suffix
    logic [3:0] inc0;      // ctxIdxInc of bin 0 (from nA/nB info)
    logic [3:0] inc1;      // ctxIdxInc of bin 1 (unary-type prefixes)
    logic [3:0] inc_max;   // ctxIdxInc limit for bins >= 1
    logic [5:0] cmax;      // FL bins, TU cMax, or UEGk uCoff
    logic [1:0] k;         // UEGk suffix order
    logic       sgn;       // UEGk signed, or TU signed mapping
    logic       pre_en;    // preload hint valid
    grp_t       pre_grp;   // group to preload after a miss load
  } cabac_req_t;

  // Model helpers.
  function automatic logic [5:0] m_state(model_t m);
    return m[5:0];
  endfunction

  function automatic logic m_mps(model_t m);
    return m[6];
  endfunction

endpackage
