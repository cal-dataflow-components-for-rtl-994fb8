// cavlc_run_before_encoder: run_before codeword (table chosen by
// zerosLeft, 1..6 and >6), read through the LUT memory model.
// Combinational.
// The document names this encoder; the table is the standard's, read
// through the LUT memory model.
module cavlc_run_before_encoder
  import cavlc_pkg::*;
(
  input  logic [4:0] zeros_left,
  input  logic [3:0] run_before,
  output code_t      code
);
  cavlc_rom_controller #(.TABLE(T_RUN_BEFORE)) u_lut (
    .ti(2'd0), .p0(zeros_left), .p1({3'b000, run_before}), .code);
endmodule
