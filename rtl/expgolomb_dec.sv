// expgolomb_dec: two-cycle Exp-Golomb decoder for ue(v) and se(v) codes.
//
// A codeword is N zeros, a one and N info bits; codeNum = {1, info} - 1.
// Motion vector differences at 1920x1088 need codeNum up to 14 bits, i.e.
// codewords of up to 27 bits, which a 16-bit window cannot hold in one
// piece. The decoder therefore splits the work over two cycles:
//   cycle 1 (LZ)  : count the leading zeros N in the window's top 16 bits
//                   and consume them;
//   cycle 2 (INFO): take the top N+1 bits (the one and the info bits),
//                   form codeNum and consume them.
// For se(v) codeNum k maps to (-1)^(k+1) * ceil(k/2).
// Interface: `start` with `sgn` (0: ue, 1: se) begins a decode; the window
// and `win_valid` come from the bitstream buffer and `consume`/`consume_n`
// go back to it. `done` pulses with `value` one cycle after the INFO cycle.
// Each codeword takes two cycles when the window is valid, plus one for the
// result register. Up to 15 leading zeros (31-bit codewords) are handled;
// 16 zero bits set `err`. The two-cycle split follows the document; the
// exact cycle partition and the error flag are this design's choices.
module expgolomb_dec (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               sgn,
  input  logic [31:0]        window,
  input  logic               win_valid,
  output logic               consume,
  output logic [4:0]         consume_n,
  output logic               busy,
  output logic               done,
  output logic               err,
  output logic signed [31:0] value
);

  typedef enum logic [1:0] {E_IDLE, E_LZ, E_INFO} est_e;
  est_e       st;
  logic       sgn_q;
  logic [4:0] nz;          // leading zeros found in cycle 1
  logic [4:0] lz;
  logic [16:0] code_p1;    // {1, info} = codeNum + 1
  logic [31:0] k;          // codeNum

  assign busy = (st != E_IDLE);

  always_comb begin
    lz = 5'd16;
    for (int i = 0; i < 16; i++) begin
      if (window[16 + i]) lz = 5'(15 - i);
    end
  end

  assign code_p1 = 17'(window[31:15] >> (5'd16 - nz));
  assign k       = 32'(code_p1) - 32'd1;

  always_comb begin
    consume   = 1'b0;
    consume_n = 5'd0;
    if (win_valid) begin
      if (st == E_LZ && lz != 5'd16) begin
        consume   = (lz != 5'd0);
        consume_n = lz;
      end else if (st == E_INFO) begin
        consume   = 1'b1;
        consume_n = nz + 5'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= E_IDLE;
      sgn_q <= 1'b0;
      nz    <= '0;
      done  <= 1'b0;
      err   <= 1'b0;
      value <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        E_IDLE: if (start) begin
          st    <= E_LZ;
          sgn_q <= sgn;
          err   <= 1'b0;
        end
        E_LZ: if (win_valid) begin
          if (lz == 5'd16) begin
            err  <= 1'b1;
            done <= 1'b1;
            st   <= E_IDLE;
          end else begin
            nz <= lz;
            st <= E_INFO;
          end
        end
        default: if (win_valid) begin
          st <= E_IDLE;
          done <= 1'b1;
          if (!sgn_q)    value <= $signed(k);
          else if (k[0]) value <= $signed((k + 32'd1) >> 1);
          else           value <= -$signed(k >> 1);
        end
      endcase
    end
  end

endmodule
