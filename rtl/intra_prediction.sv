// intra_prediction: four-parallel intra prediction engine for H.264 luma:
// the nine 4x4 modes and the four 16x16 modes from one set of four
// reconfigurable processing elements (PE0..PE3) under one PE controller.
// Interface: neighbouring samples enter serially on sample_valid/
// sample_ready/sample, with blk (BLK4 or BLK16) sampled on the first sample
// of a block (order: 4x4: M, A..H, I..L; 16x16: T0..T15, then M, L0..L15).
// Predictors leave four per clock on pred_valid/pred[0..3], tagged with the
// mode, block size, row and first column of the four; block_done pulses
// once a block's last iteration has been issued. Timing: one iteration per
// clock, predictors one clock after their iteration. A 4x4 block takes 13
// sample clocks plus 38 iterations; a 16x16 block 16 + 17 sample clocks
// plus 4 * 64 + 6 iterations.
// The PE/controller network is the document's; see intra_pe_controller for
// the schedule.
module intra_prediction
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  blk_t       blk,
  input  logic       sample_valid,
  output logic       sample_ready,
  input  logic [7:0] sample,
  output logic       pred_valid,
  output logic [7:0] pred [NUM_PE],
  output logic [3:0] pred_mode,
  output blk_t       pred_blk,
  output logic [3:0] pred_row,
  output logic [3:0] pred_col,
  output logic       block_done
);
  logic       en;
  pe_ctl_t    ctl [NUM_PE];
  opnd_t      din [NUM_PE];
  logic [NUM_PE-1:0] pv;
  logic [3:0] meta_mode, meta_row, meta_col;
  blk_t       meta_blk;

  intra_pe_controller u_ctrl (
    .clk, .rst_n, .blk, .sample_valid, .sample_ready, .sample, .din,
    .en, .ctl, .meta_mode, .meta_blk, .meta_row, .meta_col, .block_done);

  for (genvar k = 0; k < NUM_PE; k++) begin : g_pe
    intra_pe u_pe (.clk, .rst_n, .en, .ctl(ctl[k]), .din(din[k]), .pred(pred[k]), .pred_valid(pv[k]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pred_mode <= '0;
      pred_blk  <= BLK4;
      pred_row  <= '0;
      pred_col  <= '0;
    end else if (en) begin
      pred_mode <= meta_mode;
      pred_blk  <= meta_blk;
      pred_row  <= meta_row;
      pred_col  <= meta_col;
    end
  end

  // an iteration either produces predictors in all PEs or in none
  assign pred_valid = pv[0] || pv[1] || pv[2] || pv[3];
endmodule
