// cavlc_rom_controller: the controller of the CAVLC LUT memory model. It
// forms the address of a table entry from the coding parameters (p0, p1:
// coeff_token: table Ti and TotalCoeffs / TrailingOnes in p1 = {tc, t1};
// total_zeros: p0 = TotalCoeffs, p1 = total_zeros; run_before: p0 =
// zerosLeft, p1 = run_before), reads the code ROM (codeword without its
// leading zeros) and the VBW ROM (its full width), and aligns the
// codeword: code.len = VBW and the stored bits sit at the low end, so
// sending len bits MSB first re-inserts the stripped zeros. Combinational.
// Storing stripped codewords plus their width is the document's memory
// model; the parallel (instead of serial) output is this design's choice.
module cavlc_rom_controller
  import cavlc_pkg::*;
#(
  parameter vlc_table_t TABLE = T_COEFF_TOKEN
) (
  input  logic [1:0] ti,
  input  logic [4:0] p0,
  input  logic [6:0] p1,
  output code_t      code
);
  logic [8:0] addr;
  logic [5:0] val;
  logic [4:0] vbw;
  logic [4:0] zl7;   // zerosLeft, with every value above 6 using the ">6" table

  assign zl7 = (p0 > 5'd7) ? 5'd7 : p0;

  always_comb begin
    unique case (TABLE)
      T_COEFF_TOKEN: addr = 9'(ti) * 9'(CT_N / 4) + 9'(p1);
      T_TOTAL_ZEROS: addr = {p0 - 5'd1, 4'd0} + 9'(p1[3:0]);
      default:       addr = {zl7 - 5'd1, 4'd0} + 9'(p1[3:0]);
    endcase
  end

  cavlc_code_rom #(.TABLE(TABLE)) u_rom (.addr, .val);
  cavlc_vbw_rom  #(.TABLE(TABLE)) u_vbw (.addr, .vbw);

  assign code.bits = 32'(val);
  assign code.len  = 6'(vbw);
endmodule
