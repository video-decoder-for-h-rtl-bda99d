// cabac_lps_lut: LPS range table and probability-state transition tables.
//
// Purely combinational. From the model's probability state (pStateIdx,
// 0..63) and the quantised current range q = (codIRange >> 6) & 3 it gives
// the LPS sub-range, and it gives the next state after an MPS bin and after
// an LPS bin. The document specifies a lookup on RANGE and PSTATE with an
// approximate value of RANGE times the LPS probability; the numbers are the
// standard H.264 CABAC tables (rangeTabLPS, transIdxLPS), written here as
// case statements. The MPS transition is min(state + 1, 62), with state 63
// (reserved for the terminate bin) left unchanged.
module cabac_lps_lut (
  input  logic [5:0] pstate,
  input  logic [1:0] q,          // range[7:6]
  output logic [7:0] rlps,       // LPS range
  output logic [5:0] next_mps,   // state after an MPS bin
  output logic [5:0] next_lps    // state after an LPS bin
);

  logic [31:0] row;  // four 8-bit entries, q = 0 in bits [31:24]

  always_comb begin
    unique case (pstate)
      6'd0 : row = {8'd128, 8'd176, 8'd208, 8'd240};
      6'd1 : row = {8'd128, 8'd167, 8'd197, 8'd227};
      6'd2 : row = {8'd128, 8'd158, 8'd187, 8'd216};
      6'd3 : row = {8'd123, 8'd150, 8'd178, 8'd205};
      6'd4 : row = {8'd116, 8'd142, 8'd169, 8'd195};
      6'd5 : row = {8'd111, 8'd135, 8'd160, 8'd185};
      6'd6 : row = {8'd105, 8'd128, 8'd152, 8'd175};
      6'd7 : row = {8'd100, 8'd122, 8'd144, 8'd166};
      6'd8 : row = {8'd95,  8'd116, 8'd137, 8'd158};
      6'd9 : row = {8'd90,  8'd110, 8'd130, 8'd150};
      6'd10: row = {8'd85,  8'd104, 8'd123, 8'd142};
      6'd11: row = {8'd81,  8'd99,  8'd117, 8'd135};
      6'd12: row = {8'd77,  8'd94,  8'd111, 8'd128};
      6'd13: row = {8'd73,  8'd89,  8'd105, 8'd122};
      6'd14: row = {8'd69,  8'd85,  8'd100, 8'd116};
      6'd15: row = {8'd66,  8'd80,  8'd95,  8'd110};
      6'd16: row = {8'd62,  8'd76,  8'd90,  8'd104};
      6'd17: row = {8'd59,  8'd72,  8'd86,  8'd99};
      6'd18: row = {8'd56,  8'd69,  8'd81,  8'd94};
      6'd19: row = {8'd53,  8'd65,  8'd77,  8'd89};
      6'd20: row = {8'd51,  8'd62,  8'd73,  8'd85};
      6'd21: row = {8'd48,  8'd59,  8'd69,  8'd80};
      6'd22: row = {8'd46,  8'd56,  8'd66,  8'd76};
      6'd23: row = {8'd43,  8'd53,  8'd63,  8'd72};
      6'd24: row = {8'd41,  8'd50,  8'd59,  8'd69};
      6'd25: row = {8'd39,  8'd48,  8'd56,  8'd65};
      6'd26: row = {8'd37,  8'd45,  8'd54,  8'd62};
      6'd27: row = {8'd35,  8'd43,  8'd51,  8'd59};
      6'd28: row = {8'd33,  8'd41,  8'd48,  8'd56};
      6'd29: row = {8'd32,  8'd39,  8'd46,  8'd53};
      6'd30: row = {8'd30,  8'd37,  8'd43,  8'd50};
      6'd31: row = {8'd29,  8'd35,  8'd41,  8'd48};
      6'd32: row = {8'd27,  8'd33,  8'd39,  8'd45};
      6'd33: row = {8'd26,  8'd31,  8'd37,  8'd43};
      6'd34: row = {8'd24,  8'd30,  8'd35,  8'd41};
      6'd35: row = {8'd23,  8'd28,  8'd33,  8'd39};
      6'd36: row = {8'd22,  8'd27,  8'd32,  8'd37};
      6'd37: row = {8'd21,  8'd26,  8'd30,  8'd35};
      6'd38: row = {8'd20,  8'd24,  8'd29,  8'd33};
      6'd39: row = {8'd19,  8'd23,  8'd27,  8'd31};
      6'd40: row = {8'd18,  8'd22,  8'd26,  8'd30};
      6'd41: row = {8'd17,  8'd21,  8'd25,  8'd28};
      6'd42: row = {8'd16,  8'd20,  8'd23,  8'd27};
      6'd43: row = {8'd15,  8'd19,  8'd22,  8'd25};
      6'd44: row = {8'd14,  8'd18,  8'd21,  8'd24};
      6'd45: row = {8'd14,  8'd17,  8'd20,  8'd23};
      6'd46: row = {8'd13,  8'd16,  8'd19,  8'd22};
      6'd47: row = {8'd12,  8'd15,  8'd18,  8'd21};
      6'd48: row = {8'd12,  8'd14,  8'd17,  8'd20};
      6'd49: row = {8'd11,  8'd14,  8'd16,  8'd19};
      6'd50: row = {8'd11,  8'd13,  8'd15,  8'd18};
      6'd51: row = {8'd10,  8'd12,  8'd15,  8'd17};
      6'd52: row = {8'd10,  8'd12,  8'd14,  8'd16};
      6'd53: row = {8'd9,   8'd11,  8'd13,  8'd15};
      6'd54: row = {8'd9,   8'd11,  8'd12,  8'd14};
      6'd55: row = {8'd8,   8'd10,  8'd12,  8'd14};
      6'd56: row = {8'd8,   8'd9,   8'd11,  8'd13};
      6'd57: row = {8'd7,   8'd9,   8'd11,  8'd12};
      6'd58: row = {8'd7,   8'd9,   8'd10,  8'd12};
      6'd59: row = {8'd7,   8'd8,   8'd10,  8'd11};
      6'd60: row = {8'd6,   8'd8,   8'd9,   8'd11};
      6'd61: row = {8'd6,   8'd7,   8'd9,   8'd10};
      6'd62: row = {8'd6,   8'd7,   8'd8,   8'd9};
      default: row = {8'd2, 8'd2,   8'd2,   8'd2};
    endcase
  end

  always_comb begin
    unique case (q)
      2'd0: rlps = row[31:24];
      2'd1: rlps = row[23:16];
      2'd2: rlps = row[15:8];
      default: rlps = row[7:0];
    endcase
  end

  always_comb begin
    if (pstate >= 6'd62) next_mps = pstate;
    else                 next_mps = pstate + 6'd1;
  end

  always_comb begin
    unique case (pstate)
      6'd0, 6'd1:                    next_lps = 6'd0;
      6'd2:                          next_lps = 6'd1;
      6'd3, 6'd4:                    next_lps = 6'd2;
      6'd5, 6'd6:                    next_lps = 6'd4;
      6'd7:                          next_lps = 6'd5;
      6'd8:                          next_lps = 6'd6;
      6'd9:                          next_lps = 6'd7;
      6'd10:                         next_lps = 6'd8;
      6'd11, 6'd12:                  next_lps = 6'd9;
      6'd13, 6'd14:                  next_lps = 6'd11;
      6'd15:                         next_lps = 6'd12;
      6'd16, 6'd17:                  next_lps = 6'd13;
      6'd18, 6'd19:                  next_lps = 6'd15;
      6'd20, 6'd21:                  next_lps = 6'd16;
      6'd22, 6'd23:                  next_lps = 6'd18;
      6'd24, 6'd25:                  next_lps = 6'd19;
      6'd26, 6'd27:                  next_lps = 6'd21;
      6'd28, 6'd29:                  next_lps = 6'd22;
      6'd30:                         next_lps = 6'd23;
      6'd31, 6'd32:                  next_lps = 6'd24;
      6'd33:                         next_lps = 6'd25;
      6'd34, 6'd35:                  next_lps = 6'd26;
      6'd36, 6'd37:                  next_lps = 6'd27;
      6'd38:                         next_lps = 6'd28;
      6'd39, 6'd40:                  next_lps = 6'd29;
      6'd41, 6'd42, 6'd43:           next_lps = 6'd30;
      6'd44:                         next_lps = 6'd31;
      6'd45, 6'd46:                  next_lps = 6'd32;
      6'd47, 6'd48, 6'd49:           next_lps = 6'd33;
      6'd50, 6'd51:                  next_lps = 6'd34;
      6'd52, 6'd53, 6'd54:           next_lps = 6'd35;
      6'd55, 6'd56, 6'd57:           next_lps = 6'd36;
      6'd58, 6'd59, 6'd60:           next_lps = 6'd37;
      6'd61, 6'd62:                  next_lps = 6'd38;
      default:                       next_lps = 6'd63;
    endcase
  end

endmodule
