// cavlc_total_zeros_encoder: total_zeros codeword (table chosen by
// TotalCoeffs, 1..15), read through the LUT memory model. Combinational.
// The document names this encoder; the table is the standard's, read
// through the LUT memory model.
module cavlc_total_zeros_encoder
  import cavlc_pkg::*;
(
  input  logic [4:0] total_coeffs,
  input  logic [4:0] total_zeros,
  output code_t      code
);
  cavlc_rom_controller #(.TABLE(T_TOTAL_ZEROS)) u_lut (
    .ti(2'd0), .p0(total_coeffs), .p1({2'b00, total_zeros}), .code);
endmodule
