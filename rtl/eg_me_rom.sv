// eg_me_rom: the ME_MAPPING table: coded_block_pattern -> code_num for
// mapped Exp-Golomb coding, for ChromaArrayType 1 or 2 (4:2:0). The table
// is stored inverted relative to the standard's listing (which goes from
// code_num to CBP), so that the 6-bit CBP itself is the address; 'pmode'
// selects the Intra_4x4 or the Inter column. Read is combinational (a ROM
// built from logic).
module eg_me_rom
  import eg_pkg::*;
(
  input  pmode_t     pmode,
  input  logic [5:0] addr,
  output logic [5:0] code_num
);
  // code_num of each CBP value 0..47, Intra_4x4 prediction
  localparam logic [5:0] INTRA [48] = '{
    6'd3, 6'd29, 6'd30, 6'd17, 6'd31, 6'd18, 6'd37, 6'd8, 6'd32, 6'd38, 6'd19, 6'd9,
    6'd20, 6'd10, 6'd11, 6'd2, 6'd16, 6'd33, 6'd34, 6'd21, 6'd35, 6'd22, 6'd39, 6'd4,
    6'd36, 6'd40, 6'd23, 6'd5, 6'd24, 6'd6, 6'd7, 6'd1, 6'd41, 6'd42, 6'd43, 6'd25,
    6'd44, 6'd26, 6'd46, 6'd12, 6'd45, 6'd47, 6'd27, 6'd13, 6'd28, 6'd14, 6'd15, 6'd0
  };
  // code_num of each CBP value 0..47, Inter prediction
  localparam logic [5:0] INTER [48] = '{
    6'd0, 6'd2, 6'd3, 6'd7, 6'd4, 6'd8, 6'd17, 6'd13, 6'd5, 6'd18, 6'd9, 6'd14,
    6'd10, 6'd15, 6'd16, 6'd11, 6'd1, 6'd32, 6'd33, 6'd36, 6'd34, 6'd37, 6'd44, 6'd40,
    6'd35, 6'd45, 6'd38, 6'd41, 6'd39, 6'd42, 6'd43, 6'd19, 6'd6, 6'd24, 6'd25, 6'd20,
    6'd26, 6'd21, 6'd46, 6'd28, 6'd27, 6'd47, 6'd22, 6'd29, 6'd23, 6'd30, 6'd31, 6'd12
  };

  always_comb begin
    if (addr >= 6'd48)          code_num = '0;
    else if (pmode == PM_INTRA) code_num = INTRA[addr];
    else                        code_num = INTER[addr];
  end
endmodule
