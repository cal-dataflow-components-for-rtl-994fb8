// avc_encoder: the H.264/AVC baseline encoder components: inter prediction
// (full-search motion estimation, motion compensation and the
// reconstruction adder), the four-parallel intra predictor, and the two
// entropy coders (Exp-Golomb for syntax elements, CAVLC for residual
// blocks). They share clock and reset and otherwise stand side by side:
// the forward/inverse transform and quantisation, the deblocking filter
// and the header/slice logic that would join them are not part of this
// RTL, so their connections are ports:
//   comp_* (compensation error and compensated pixel, to the transform),
//   rec_*  (reconstructed error coming back, with the compensated pixel and
//           address passed along),
//   intra sample_* (reconstructed neighbours), eg_* (syntax elements),
//   cv_* (quantised coefficients and the neighbour counts for nC).
// See the sub-blocks for interfaces and timing.
// The set of subsystems follows the document's encoder overview; leaving
// them unconnected to each other and the shared synchronous reset are this
// design's choices.
module avc_encoder
  import me_pkg::*;
  import intra_pkg::*;
  import eg_pkg::*;
  import cavlc_pkg::*;
#(
  parameter int unsigned FRAME_W      = 176,
  parameter int unsigned FRAME_H      = 144,
  parameter int unsigned SEARCH_RANGE = 8,
  localparam int unsigned AW          = $clog2(FRAME_W * FRAME_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- inter prediction
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_data,
  input  logic              flip,
  output logic              mv_valid,
  output mv_t               mv,
  output pos_t              mv_pos,
  output logic [SADW-1:0]   mv_score,
  output logic              comp_valid,
  output logic [AW-1:0]     comp_addr,
  output logic [7:0]        comp_pixel,
  output logic signed [8:0] comp_err,
  input  logic              rec_valid,
  input  logic [AW-1:0]     rec_addr,
  input  logic [7:0]        rec_comp,
  input  logic signed [8:0] rec_err,
  output logic              me_frame_done,
  output logic              mc_frame_done,
  output logic              mc_stall,
  // ---- intra prediction
  input  blk_t              ip_blk,
  input  logic              ip_sample_valid,
  output logic              ip_sample_ready,
  input  logic [7:0]        ip_sample,
  output logic              ip_pred_valid,
  output logic [7:0]        ip_pred [NUM_PE],
  output logic [3:0]        ip_pred_mode,
  output blk_t              ip_pred_blk,
  output logic [3:0]        ip_pred_row,
  output logic [3:0]        ip_pred_col,
  output logic              ip_block_done,
  // ---- Exp-Golomb
  input  logic              eg_valid,
  output logic              eg_ready,
  input  eg_type_t          eg_type,
  input  logic [VW-1:0]     eg_value,
  input  logic [VW-1:0]     eg_range,
  input  pmode_t            eg_pmode,
  input  logic [1:0]        eg_cat,
  output logic              eg_bit_valid,
  output logic              eg_bit,
  output logic              eg_bit_last,
  // ---- CAVLC
  input  logic              cv_coef_valid,
  output logic              cv_coef_ready,
  input  coef_t             cv_coef,
  input  logic [4:0]        cv_nu,
  input  logic [4:0]        cv_nl,
  input  logic [1:0]        cv_avail,
  output logic              cv_bit_valid,
  output logic              cv_bit,
  output logic              cv_blk_last,
  output logic [4:0]        cv_total_coeffs
);
  inter_prediction #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .SEARCH_RANGE(SEARCH_RANGE)) u_inter (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .flip,
    .mv_valid, .mv, .mv_pos, .mv_score,
    .comp_valid, .comp_addr, .comp_pixel, .comp_err,
    .rec_valid, .rec_addr, .rec_comp, .rec_err,
    .me_frame_done, .mc_frame_done, .mc_stall);

  intra_prediction u_intra (
    .clk, .rst_n, .blk(ip_blk), .sample_valid(ip_sample_valid), .sample_ready(ip_sample_ready),
    .sample(ip_sample), .pred_valid(ip_pred_valid), .pred(ip_pred), .pred_mode(ip_pred_mode),
    .pred_blk(ip_pred_blk), .pred_row(ip_pred_row), .pred_col(ip_pred_col),
    .block_done(ip_block_done));

  exp_golomb u_eg (
    .clk, .rst_n, .in_valid(eg_valid), .in_ready(eg_ready), .etype(eg_type), .value(eg_value),
    .range(eg_range), .pmode(eg_pmode), .cat(eg_cat),
    .bit_valid(eg_bit_valid), .bit_out(eg_bit), .bit_last(eg_bit_last));

  cavlc u_cavlc (
    .clk, .rst_n, .coef_valid(cv_coef_valid), .coef_ready(cv_coef_ready), .coef(cv_coef),
    .nu(cv_nu), .nl(cv_nl), .avail(cv_avail),
    .bit_valid(cv_bit_valid), .bit_out(cv_bit), .blk_last(cv_blk_last), .total_coeffs(cv_total_coeffs));
endmodule
