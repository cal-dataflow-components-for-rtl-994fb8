// exp_golomb: Exp-Golomb coder for H.264 syntax elements. One input port
// (in_valid/in_ready with the element's type, value, and for te its range,
// for me its prediction mode and chroma array type) and one serial output
// (bit_valid/bit_out, bit_last on a codeword's final bit).
// Network: the mapping controller picks one of the four mappers (ue, se,
// te, me; me reads the ME_MAPPING ROM), the code generator splits
// code_num + 1 into prefix and INFO suffix, and the assembler sends
// prefix and suffix out serially. The unsigned mapping is the identity
// (code_num = value) and the me mapping only forwards coded_block_pattern
// and the prediction mode to the ROM as its address, so both are plain
// wiring here; ChromaArrayType is carried but not used, as only the
// ChromaArrayType 1/2 table is stored.
// Timing: a codeword of L bits occupies the output for L clocks; the
// first bit appears two clocks after the element is accepted, and the next
// element can be accepted while a codeword is being sent.
// The network of mapping controller, mappers, ROM, code generator and
// assembler is the document's; handshakes and timing are this design's.
module exp_golomb
  import eg_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  eg_type_t      etype,
  input  logic [VW-1:0] value,
  input  logic [VW-1:0] range,
  input  pmode_t        pmode,
  input  logic [1:0]    cat,
  output logic          bit_valid,
  output logic          bit_out,
  output logic          bit_last
);
  logic [VW-1:0]  map_k, map_range;
  logic [5:0]     map_cbp, rom_addr, rom_cn;
  pmode_t         map_pmode, rom_pmode;
  logic [1:0]     map_cat;
  logic [CNW-1:0] ue_cn, se_cn, te_cn, me_cn, code_num, info;
  logic           te_raw, te_raw_bit, cn_valid, cn_ready, raw, raw_bit;
  logic [4:0]     m;

  eg_mapping_controller u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .etype, .value, .range, .pmode, .cat,
    .map_k, .map_range, .map_cbp, .map_pmode, .map_cat,
    .ue_cn, .se_cn, .te_cn, .te_raw, .te_raw_bit, .me_cn,
    .cn_valid, .cn_ready, .code_num, .raw, .raw_bit);

  assign ue_cn = CNW'(map_k);
  eg_se_mapper u_se (.k(map_k), .code_num(se_cn));
  eg_te_mapper u_te (.k(map_k), .range(map_range), .code_num(te_cn), .raw(te_raw), .raw_bit(te_raw_bit));
  assign rom_addr  = map_cbp;
  assign rom_pmode = map_pmode;
  assign me_cn     = CNW'(rom_cn);
  eg_me_rom    u_rom (.pmode(rom_pmode), .addr(rom_addr), .code_num(rom_cn));

  eg_code_generator u_gen (.code_num, .m, .info);

  eg_assembler u_asm (
    .clk, .rst_n, .in_valid(cn_valid), .in_ready(cn_ready), .m, .info, .raw, .raw_bit,
    .bit_valid, .bit_out, .bit_last);

  logic unused_cat;
  assign unused_cat = ^map_cat;
endmodule
