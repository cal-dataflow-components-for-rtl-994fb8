// cavlc_sign_encoder: the trailing_ones_sign_flag codes: one bit per
// trailing one, 1 for -1 and 0 for +1, highest frequency first. Gives the
// one-bit code of trailing one 'idx'. Combinational.
// The document names this encoder; the one-bit flag code is the
// standard's.
module cavlc_sign_encoder
  import cavlc_pkg::*;
(
  input  logic [2:0] t1_neg,
  input  logic [1:0] idx,
  output code_t      code
);
  assign code.bits = 32'(t1_neg[idx]);
  assign code.len  = 6'd1;
endmodule
