// cavlc_code_rom: codeword memory of the CAVLC LUT memory model. Holds,
// for one VLC table (parameter TABLE), each codeword with its leading
// zeros stripped (its numeric value, 6 bits). Asynchronous read.
// Storing codewords without leading zeros is the document's LUT memory
// model; the contents are the standard's CAVLC tables.
module cavlc_code_rom
  import cavlc_pkg::*;
#(
  parameter vlc_table_t TABLE = T_COEFF_TOKEN
) (
  input  logic [8:0] addr,
  output logic [5:0] val
);
  always_comb begin
    unique case (TABLE)
      T_COEFF_TOKEN: val = (int'(addr) < CT_N) ? CT_VAL[addr] : '0;
      T_TOTAL_ZEROS: val = (int'(addr) < TZ_N) ? TZ_VAL[addr[7:0]] : '0;
      default:       val = (int'(addr) < RB_N) ? RB_VAL[addr[6:0]] : '0;
    endcase
  end
endmodule
