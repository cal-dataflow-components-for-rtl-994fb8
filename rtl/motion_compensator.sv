// motion_compensator: builds the motion-compensated frame and the
// compensation error, MB by MB, and then streams both out.
// Network: incremental control, MB raster scanner, MV adder, memory
// controllers 1 and 2, receiver, subtractor, compensated frame memory,
// compensation error memory and one R/W switch per memory.
//
// Write phase (after 'start'): for each MB position from the scanner the
// block takes a motion vector (mv_valid/mv_ready), memory controller 1
// reads the displaced reference MB through the motion estimator
// (ref_re/ref_addr, one address per clock, pixels back on ref_valid/
// ref_data), the receiver relays each returned pixel to the compensated
// frame memory and to the subtractor, which forms current - compensated
// using the current MB pixel read at cur_idx (cur_data), and memory
// controller 2 supplies the write address, stepping once per pixel.
// mb_done pulses when an MB is complete. After the last MB a CLR flips the
// R/W switches to read and the scanner runs again: memory controller 2
// reads each MB of both memories and out_valid/out_addr/out_comp/out_err
// stream the frame out in MB order (raster order within the MB), one pixel
// per clock. frame_done pulses after the last MB has been read out.
// The network follows the document's figure; the handshakes are this
// design's choice. Status outputs of the shared sub-blocks that this
// sequencing does not need (the controllers' last/done/idx, the R/W
// switches' mode) are declared but stay unread.
module motion_compensator
  import me_pkg::*;
#(
  parameter int unsigned FRAME_W = 176,
  parameter int unsigned FRAME_H = 144,
  localparam int unsigned AW     = $clog2(FRAME_W * FRAME_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              mv_valid,
  output logic              mv_ready,
  input  mv_t               mv,
  output logic              ref_re,
  output logic [AW-1:0]     ref_addr,
  input  logic              ref_valid,
  input  logic [7:0]        ref_data,
  output logic [7:0]        cur_idx,
  input  logic [7:0]        cur_data,
  output logic              mb_done,
  output logic              out_valid,
  output logic [AW-1:0]     out_addr,
  output logic [7:0]        out_comp,
  output logic signed [8:0] out_err,
  output logic              frame_done
);
  logic clr, incr, to_read, to_write, read_phase;
  logic scan_valid, scan_done;
  pos_t scan_pos, ref_pos;
  logic c1_done, c1_last, c2_start, c2_step, c2_busy, c2_last, c2_done;
  logic [7:0] c1_idx, c2_idx;
  logic [AW-1:0] c2_addr;
  logic rx_valid, rx_done;
  logic [7:0] rx_data;
  logic signed [8:0] err;
  logic wait_mv;

  incremental_control u_inc (
    .clk, .rst_n, .start, .rx_mb_done(rx_done), .rd_mb_done(read_phase && c2_done),
    .scan_done, .clr, .incr, .to_read, .to_write, .read_phase, .frame_done);

  mb_raster_scanner #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_scan (
    .clk, .rst_n, .clr, .incr, .pos(scan_pos), .pos_valid(scan_valid), .done(scan_done));

  mv_adder u_add (.pos(scan_pos), .mv, .ref_pos);

  assign mv_ready = wait_mv;

  mb_mem_controller #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_ctrl1 (
    .clk, .rst_n, .start(mv_valid && mv_ready), .pos(ref_pos), .step(1'b1),
    .busy(ref_re), .addr(ref_addr), .idx(c1_idx), .last(c1_last), .done(c1_done));

  assign c2_start = read_phase ? scan_valid : (mv_valid && mv_ready);
  assign c2_step  = read_phase ? 1'b1 : rx_valid;
  mb_mem_controller #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_ctrl2 (
    .clk, .rst_n, .start(c2_start), .pos(scan_pos), .step(c2_step),
    .busy(c2_busy), .addr(c2_addr), .idx(c2_idx), .last(c2_last), .done(c2_done));

  mc_receiver u_rx (
    .clk, .rst_n, .in_valid(ref_valid), .in_data(ref_data),
    .out_valid(rx_valid), .out_data(rx_data), .idx(cur_idx), .mb_done(rx_done));
  assign mb_done = rx_done;

  mc_subtractor u_sub (.cur(cur_data), .comp(rx_data), .err);

  logic          cm_we, cm_re, em_we, em_re, cm_mode, em_mode;
  logic [AW-1:0] cm_waddr, cm_raddr, em_waddr, em_raddr;

  rw_switch #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_rw_comp (
    .clk, .rst_n, .to_read, .to_write, .addr(c2_addr), .wr(rx_valid), .rd(c2_busy),
    .mem_we(cm_we), .mem_waddr(cm_waddr), .mem_re(cm_re), .mem_raddr(cm_raddr),
    .read_mode(cm_mode));
  rw_switch #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_rw_err (
    .clk, .rst_n, .to_read, .to_write, .addr(c2_addr), .wr(rx_valid), .rd(c2_busy),
    .mem_we(em_we), .mem_waddr(em_waddr), .mem_re(em_re), .mem_raddr(em_raddr),
    .read_mode(em_mode));

  logic [8:0] err_rdata;
  frame_memory #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .DW(8)) u_comp_mem (
    .clk, .we(cm_we), .waddr(cm_waddr), .wdata(rx_data),
    .re(cm_re), .raddr(cm_raddr), .rdata(out_comp));
  frame_memory #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .DW(9)) u_err_mem (
    .clk, .we(em_we), .waddr(em_waddr), .wdata(err),
    .re(em_re), .raddr(em_raddr), .rdata(err_rdata));
  assign out_err = err_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wait_mv   <= 1'b0;
      out_valid <= 1'b0;
      out_addr  <= '0;
    end else begin
      if (!read_phase && scan_valid) wait_mv <= 1'b1;
      else if (mv_valid && mv_ready) wait_mv <= 1'b0;
      out_valid <= cm_re;
      out_addr  <= cm_raddr;
    end
  end
endmodule
