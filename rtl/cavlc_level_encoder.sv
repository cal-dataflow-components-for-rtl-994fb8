// cavlc_level_encoder: codes the nonzero coefficients that are not
// trailing ones (levels), highest frequency first, as level_prefix (that
// many zeros and a one) followed by a level_suffix of suffixLength bits,
// with the context adaptation of CAVLC:
//   levelCode = 2*level - 2 (level > 0) or -2*level - 1 (level < 0),
//   reduced by 2 for the first level when TrailingOnes < 3;
//   suffixLength starts at 1 when TotalCoeffs > 10 and TrailingOnes < 3,
//   else 0; prefix 14 (suffixLength 0) takes a 4-bit suffix, prefix 15 a
//   12-bit escape suffix; after each level suffixLength becomes at least 1
//   and grows by one (up to 6) when |level| > 3 << (suffixLength - 1).
// 'init' (with tc, t1) starts a block, 'code' is the codeword of 'level'
// under the current state, 'next' commits it and updates suffixLength.
// Levels beyond the prefix-15 escape range are not representable.
// The document only names this encoder; the level coding rules are the
// standard's, the one-level-per-step sequencing is this design's choice.
module cavlc_level_encoder
  import cavlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic [4:0] tc,
  input  logic [1:0] t1,
  input  coef_t      level,
  input  logic       first,
  input  logic       next,
  output code_t      code
);
  logic [2:0]  sl;
  logic [1:0]  t1_q;
  logic [16:0] mag;
  logic [17:0] lc;
  logic [4:0]  prefix;
  logic [3:0]  slen;
  logic [17:0] suf;

  assign mag = level[CW-1] ? 17'(-$signed({level[CW-1], level})) : 17'(level);

  always_comb begin
    lc = level[CW-1] ? (18'(mag) * 2 - 18'd1) : (18'(mag) * 2 - 18'd2);
    if (first && t1_q < 2'd3) lc = lc - 18'd2;
    if (sl == 3'd0) begin
      if (lc < 18'd14)      begin prefix = 5'(lc); slen = 4'd0;  suf = '0;         end
      else if (lc < 18'd30) begin prefix = 5'd14;  slen = 4'd4;  suf = lc - 18'd14; end
      else                  begin prefix = 5'd15;  slen = 4'd12; suf = lc - 18'd30; end
    end else begin
      if (lc < (18'd15 << sl)) begin
        prefix = 5'(lc >> sl);
        slen   = 4'(sl);
        suf    = lc & ((18'd1 << sl) - 18'd1);
      end else begin
        prefix = 5'd15;
        slen   = 4'd12;
        suf    = lc - (18'd15 << sl);
      end
    end
    code.bits = (32'd1 << slen) | 32'(suf);
    code.len  = 6'(prefix) + 6'd1 + 6'(slen);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sl   <= '0;
      t1_q <= '0;
    end else if (init) begin
      sl   <= (tc > 5'd10 && t1 < 2'd3) ? 3'd1 : 3'd0;
      t1_q <= t1;
    end else if (next) begin
      logic [2:0] s;
      s = (sl == 3'd0) ? 3'd1 : sl;
      if (mag > (17'd3 << (s - 3'd1)) && s < 3'd6) s = s + 3'd1;
      sl <= s;
    end
  end
endmodule
