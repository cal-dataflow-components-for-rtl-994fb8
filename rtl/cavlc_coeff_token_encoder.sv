// cavlc_coeff_token_encoder: coeff_token codeword of a block from
// TotalCoeffs, TrailingOnes and the selected table Ti, read through the
// LUT memory model. Combinational.
// The document names this encoder and its inputs; the table is the
// standard's, read through the LUT memory model.
module cavlc_coeff_token_encoder
  import cavlc_pkg::*;
(
  input  logic [1:0] ti,
  input  logic [4:0] total_coeffs,
  input  logic [1:0] trailing_ones,
  output code_t      code
);
  cavlc_rom_controller #(.TABLE(T_COEFF_TOKEN)) u_lut (
    .ti, .p0(5'd0), .p1({total_coeffs, trailing_ones}), .code);
endmodule
