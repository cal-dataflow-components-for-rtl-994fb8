// cavlc: context-adaptive variable-length coder for one 4x4 luma block of
// quantised coefficients. Coefficients enter one per clock in raster order
// (coef_valid/coef_ready); nu/nl/avail give the nonzero counts of the upper
// and left neighbouring blocks with the first coefficient. The bitstream
// leaves serially (bit_valid/bit_out), blk_last marking a block's final
// bit, with that block's TotalCoeffs on total_coeffs for use by later
// neighbours.
// Network: zigzag scanner -> counter (TotalCoeffs, TrailingOnes,
// total_zeros) and the reversed block (plain rewiring) -> zeros-run counter and splitter (trailing
// ones / levels); N calculator -> table selector; the coeff_token,
// total_zeros and run_before encoders read their codes through the LUT
// memory model (code ROM + VBW ROM + controller); sign and level encoders;
// the assembler orders the codes and shifts them out.
// Timing: a block is accepted in 16 clocks; it is then coded in (number
// of codes) + (number of bits) clocks, during which the next block waits.
// The actor network follows the document's CAVLC figure; the handshakes,
// the single block buffer and the code-by-code serial output are this
// design's choices.
module cavlc
  import cavlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       coef_valid,
  output logic       coef_ready,
  input  coef_t      coef,
  input  logic [4:0] nu,
  input  logic [4:0] nl,
  input  logic [1:0] avail,
  output logic       bit_valid,
  output logic       bit_out,
  output logic       blk_last,
  output logic [4:0] total_coeffs
);
  coefs_t     zz, rs;
  logic       blk_valid, blk_take;
  logic [4:0] nu_q, nl_q, nc, total_zeros, n_lev;
  logic [1:0] avail_q, ti, trailing_ones, n_t1, sign_idx;
  logic [2:0] t1_neg;
  logic [3:0] run_before [16];
  logic [4:0] zeros_left [16];
  coef_t      levels [16];
  logic [3:0] lvl_idx, run_idx, zl_idx;
  logic       lvl_init, lvl_next;
  code_t      ct_code, sign_code, lvl_code, tz_code, run_code;

  cavlc_zigzag_scanner u_zz (
    .clk, .rst_n, .coef_valid, .coef_ready, .coef, .nu_in(nu), .nl_in(nl), .avail_in(avail),
    .blk_valid, .blk_take, .zz, .nu(nu_q), .nl(nl_q), .avail(avail_q));

  cavlc_counter u_cnt (.zz, .total_coeffs, .trailing_ones, .total_zeros);
  cavlc_n_calculator u_nc (.nu(nu_q), .nl(nl_q), .avail(avail_q), .nc);
  cavlc_table_selector u_ts (.nc, .ti);
  // reverser: the encoders take the block from the highest frequency down
  always_comb begin
    for (int i = 0; i < 16; i++) rs[i] = zz[15 - i];
  end
  cavlc_zeros_run_counter u_zrc (.rs, .run_before, .zeros_left);
  cavlc_splitter u_split (.rs, .t1_neg, .n_t1, .levels, .n_lev);

  cavlc_coeff_token_encoder u_cte (.ti, .total_coeffs, .trailing_ones, .code(ct_code));
  cavlc_total_zeros_encoder u_tze (.total_coeffs, .total_zeros, .code(tz_code));
  cavlc_run_before_encoder  u_rbe (.zeros_left(zeros_left[run_idx]), .run_before(run_before[run_idx]),
                                   .code(run_code));
  cavlc_sign_encoder        u_se  (.t1_neg, .idx(sign_idx), .code(sign_code));
  cavlc_level_encoder       u_le  (.clk, .rst_n, .init(lvl_init), .tc(total_coeffs), .t1(trailing_ones),
                                   .level(levels[lvl_idx]), .first(lvl_idx == 4'd0), .next(lvl_next),
                                   .code(lvl_code));

  cavlc_assembler u_asm (
    .clk, .rst_n, .blk_valid, .blk_take, .total_coeffs, .n_t1, .n_lev,
    .zeros_left_sel(zeros_left[zl_idx]),
    .ct_code, .sign_code, .lvl_code, .tz_code, .run_code,
    .sign_idx, .lvl_idx, .run_idx, .zl_idx, .lvl_init, .lvl_next,
    .bit_valid, .bit_out, .blk_last);

  // the splitter and the counter must agree on the trailing ones
  always_comb begin
    if (blk_valid) assert (n_t1 == trailing_ones) else $error("trailing ones mismatch");
  end
endmodule
