// inter_prediction: the inter-prediction loop of the encoder. The motion
// estimator and motion compensator are connected as in the encoder's
// ME/MC interaction: motion vectors go ME -> MC, reference-MB addresses
// MC -> ME, reference and current MB pixels ME -> MC. The compensated
// frame and the compensation error leave on comp_*/err_* (towards the
// transform and quantisation, outside this block). The reconstructed error
// coming back (rec_valid/rec_addr/rec_comp/rec_err, with the compensated
// pixel and frame address passed along) is added to the compensated pixel
// by the reconstruction adder and written into the reference frame memory
// at rec_addr, so the reconstructed frame becomes the next reference.
// Raw video enters on in_valid/in_data with flip selecting the current
// (0) or reference (1) frame; the reconstruction path has priority and
// in_ready is low while it writes.
// Timing: per MB about 257 * (candidates + 1) + 256 + 260 clocks; the
// read-out streams one pixel per clock. The estimator's count of
// candidates of the last MB (n_comp_last) is a debug status left unread.
// The ME/MC connections and the reconstruction loop follow the document's
// figures; giving reconstruction writes priority over raw input is this
// design's choice.
module inter_prediction
  import me_pkg::*;
#(
  parameter int unsigned FRAME_W      = 176,
  parameter int unsigned FRAME_H      = 144,
  parameter int unsigned SEARCH_RANGE = 8,
  localparam int unsigned AW          = $clog2(FRAME_W * FRAME_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_data,
  input  logic              flip,
  // motion vectors of each MB, as they are found
  output logic              mv_valid,
  output mv_t               mv,
  output pos_t              mv_pos,
  output logic [SADW-1:0]   mv_score,
  // compensated frame and compensation error
  output logic              comp_valid,
  output logic [AW-1:0]     comp_addr,
  output logic [7:0]        comp_pixel,
  output logic signed [8:0] comp_err,
  // reconstructed error back from the transform path
  input  logic              rec_valid,
  input  logic [AW-1:0]     rec_addr,
  input  logic [7:0]        rec_comp,
  input  logic signed [8:0] rec_err,
  // status
  output logic              me_frame_done,
  output logic              mc_frame_done,
  output logic              mc_stall
);
  logic me_in_valid, me_in_ready, me_flip, me_addr_en;
  logic [7:0] me_in_data, rec_pixel;
  logic mv_ready, mc_re, line2_valid, mc_mb_done, frame_start;
  logic [AW-1:0] mc_addr;
  logic [7:0] line2_data, cur2_idx, cur2_data;
  logic [15:0] n_comp_last;

  recon_adder u_recon (.comp(rec_comp), .err(rec_err), .rec(rec_pixel));

  always_comb begin
    if (rec_valid) begin
      me_in_valid = 1'b1;
      me_in_data  = rec_pixel;
      me_flip     = 1'b1;
      me_addr_en  = 1'b1;
    end else begin
      me_in_valid = in_valid;
      me_in_data  = in_data;
      me_flip     = flip;
      me_addr_en  = 1'b0;
    end
  end
  assign in_ready = me_in_ready && !rec_valid;

  motion_estimator #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .SEARCH_RANGE(SEARCH_RANGE)) u_me (
    .clk, .rst_n, .in_valid(me_in_valid), .in_ready(me_in_ready), .in_data(me_in_data),
    .flip(me_flip), .addr_en(me_addr_en), .in_addr(rec_addr),
    .mv_valid, .mv_ready, .mv, .mb_pos(mv_pos), .min_score(mv_score),
    .mc_re, .mc_addr, .line2_valid, .line2_data, .cur2_idx, .cur2_data, .mc_mb_done,
    .frame_start, .frame_done(me_frame_done), .n_comp_last);

  motion_compensator #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_mc (
    .clk, .rst_n, .start(frame_start), .mv_valid, .mv_ready, .mv,
    .ref_re(mc_re), .ref_addr(mc_addr), .ref_valid(line2_valid), .ref_data(line2_data),
    .cur_idx(cur2_idx), .cur_data(cur2_data), .mb_done(mc_mb_done),
    .out_valid(comp_valid), .out_addr(comp_addr), .out_comp(comp_pixel), .out_err(comp_err),
    .frame_done(mc_frame_done));

  // ME holds a finished MB while the compensator has not yet taken it
  assign mc_stall = mv_valid && !mv_ready;
endmodule
