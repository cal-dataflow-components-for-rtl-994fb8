// cavlc_vbw_rom: valid-bit-width memory of the CAVLC LUT memory model:
// the full length of the codeword stored at the same address of the code
// ROM (0 marks an unused entry). Asynchronous read.
// The width memory is the document's LUT memory model; its contents are
// the lengths of the standard's CAVLC codes.
module cavlc_vbw_rom
  import cavlc_pkg::*;
#(
  parameter vlc_table_t TABLE = T_COEFF_TOKEN
) (
  input  logic [8:0] addr,
  output logic [4:0] vbw
);
  always_comb begin
    unique case (TABLE)
      T_COEFF_TOKEN: vbw = (int'(addr) < CT_N) ? CT_VBW[addr] : '0;
      T_TOTAL_ZEROS: vbw = (int'(addr) < TZ_N) ? TZ_VBW[addr[7:0]] : '0;
      default:       vbw = (int'(addr) < RB_N) ? RB_VBW[addr[6:0]] : '0;
    endcase
  end
endmodule
