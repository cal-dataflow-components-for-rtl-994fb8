// motion_estimator: full-search integer-pel motion estimation over 16x16
// macroblocks with SAD as the matching metric. The network of the frame
// input switch, the current/reference frame memories, their two MB memory
// controllers, the MB raster scanner, the full-search module, the current
// MB registers 1 and 2, the SAD unit, the comparator, the MV calculator,
// the address mux and the data switch.
//
// Operation: bytes arriving on in_* fill the current (flip=0) or reference
// (flip=1) frame memory. When both are loaded the raster scanner is
// cleared (frame_start pulses) and for every MB: the current MB is copied
// into MB register 1 (257 clocks); every candidate of the window is read
// from the reference memory, one pixel per clock, into the SAD (257 clocks
// per candidate); the comparator's best match gives the motion vector; MB
// register 1 is copied to MB register 2 (256 clocks); mv/mb_pos/min_score
// are offered on a valid/ready handshake to the motion compensator, which
// then reads the reference MB through the address mux (mc_re/mc_addr, data
// back one clock later on line2_*) and the current MB from register 2
// (cur2_idx -> cur2_data, combinational). When mc_mb_done pulses, the
// scanner moves on. After the last MB frame_done pulses and the frame
// memories' loaded flags clear. The next frame must not become fully loaded
// before the compensator has streamed the previous frame out (in the
// encoder loop this holds because the reference is the reconstruction of
// that stream).
// The network follows the document's figure; the sequencing (the document
// leaves synchronisation to its HDL generator) and the wait for the
// compensator between MBs are this design's choice. The sequencer uses the
// comparator's best_valid and the controllers' busy flags, so the full
// search's done, the reference controller's done and the current-MB
// controller's last output stay unread.
module motion_estimator
  import me_pkg::*;
#(
  parameter int unsigned FRAME_W      = 176,
  parameter int unsigned FRAME_H      = 144,
  parameter int unsigned SEARCH_RANGE = 8,
  localparam int unsigned AW          = $clog2(FRAME_W * FRAME_H)
) (
  input  logic            clk,
  input  logic            rst_n,
  // frame input
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [7:0]      in_data,
  input  logic            flip,
  input  logic            addr_en,
  input  logic [AW-1:0]   in_addr,
  // motion vector output
  output logic            mv_valid,
  input  logic            mv_ready,
  output mv_t             mv,
  output pos_t            mb_pos,
  output logic [SADW-1:0] min_score,
  // motion compensator side
  input  logic            mc_re,
  input  logic [AW-1:0]   mc_addr,
  output logic            line2_valid,
  output logic [7:0]      line2_data,
  input  logic [7:0]      cur2_idx,
  output logic [7:0]      cur2_data,
  input  logic            mc_mb_done,
  // status
  output logic            frame_start,
  output logic            frame_done,
  output logic [15:0]     n_comp_last
);
  typedef enum logic [2:0] {S_IDLE, S_WAITPOS, S_LOADCUR, S_SEARCH, S_COPY, S_MV, S_WAITMC} state_t;
  state_t state;

  // frame input switch and memories
  logic          cur_we, ref_we, cur_loaded, ref_loaded;
  logic [AW-1:0] sw_addr;
  logic [7:0]    sw_data;

  frame_input_switch #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_switch (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .flip, .addr_en, .in_addr,
    .frame_done, .cur_we, .ref_we, .mem_addr(sw_addr), .mem_data(sw_data),
    .cur_loaded, .ref_loaded);

  logic          cur_re;
  logic [AW-1:0] cur_raddr;
  logic [7:0]    cur_rdata, ref_rdata;
  logic          ref_re;
  logic [AW-1:0] ref_raddr;

  frame_memory #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .DW(8)) u_cur_mem (
    .clk, .we(cur_we), .waddr(sw_addr), .wdata(sw_data),
    .re(cur_re), .raddr(cur_raddr), .rdata(cur_rdata));

  frame_memory #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .DW(8)) u_ref_mem (
    .clk, .we(ref_we), .waddr(sw_addr), .wdata(sw_data),
    .re(ref_re), .raddr(ref_raddr), .rdata(ref_rdata));

  // raster scanner
  logic scan_clr, scan_incr, scan_valid, scan_done;
  pos_t scan_pos;
  mb_raster_scanner #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_scan (
    .clk, .rst_n, .clr(scan_clr), .incr(scan_incr), .pos(scan_pos),
    .pos_valid(scan_valid), .done(scan_done));

  // current frame memory controller -> MB register 1
  logic          cc_start, cc_busy, cc_last, cc_done;
  logic [7:0]    cc_idx, cc_idx_d;
  logic          cc_valid_d;
  mb_mem_controller #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_cur_ctrl (
    .clk, .rst_n, .start(cc_start), .pos(scan_pos), .step(1'b1), .busy(cc_busy),
    .addr(cur_raddr), .idx(cc_idx), .last(cc_last), .done(cc_done));
  assign cur_re = cc_busy;

  // search algorithm -> reference frame memory controller
  logic        fs_start, fs_done, cand_valid, cand_ready, n_valid;
  pos_t        cand, rc_cand;
  logic [15:0] n_comp;
  full_search #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .SEARCH_RANGE(SEARCH_RANGE)) u_search (
    .clk, .rst_n, .start(fs_start), .pos(mb_pos), .cand, .cand_valid, .cand_ready,
    .n_comp, .n_valid, .done(fs_done));

  logic          rc_start, rc_busy, rc_last, rc_done;
  logic [AW-1:0] rc_addr;
  logic [7:0]    rc_idx;
  logic          rc_start_q;
  assign cand_ready = (state == S_SEARCH) && !rc_busy && !rc_start_q;
  assign rc_start   = cand_valid && cand_ready;
  mb_mem_controller #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_ref_ctrl (
    .clk, .rst_n, .start(rc_start), .pos(cand), .step(1'b1), .busy(rc_busy),
    .addr(rc_addr), .idx(rc_idx), .last(rc_last), .done(rc_done));

  // address mux and data switch
  logic line_sel, rd_valid, line1_valid;
  logic [7:0] line1_data;
  address_mux #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_amux (
    .clk, .rst_n, .re1(rc_busy), .addr1(rc_addr), .re2(mc_re), .addr2(mc_addr),
    .mem_re(ref_re), .mem_addr(ref_raddr), .line_sel, .rd_valid);
  data_switch u_dswitch (
    .in_valid(rd_valid), .in_data(ref_rdata), .line_sel,
    .line1_valid, .line1_data, .line2_valid, .line2_data);

  // MB registers
  logic [7:0] r1_ridx, r1_rdata;
  logic [7:0] rc_idx_d;
  logic       rc_last_d;
  pos_t       rc_cand_d;
  logic [8:0] copy_cnt;
  mb_register u_mbreg1 (
    .clk, .we(cc_valid_d), .widx(cc_idx_d), .wdata(cur_rdata),
    .ridx(r1_ridx), .rdata(r1_rdata));
  assign r1_ridx = (state == S_COPY) ? copy_cnt[7:0] : rc_idx_d;

  mb_register u_mbreg2 (
    .clk, .we(state == S_COPY), .widx(copy_cnt[7:0]), .wdata(r1_rdata),
    .ridx(cur2_idx), .rdata(cur2_data));

  // SAD and comparator
  logic [SADW-1:0] score;
  logic            score_valid;
  logic [2*CW-1:0] score_tag;
  logic            best_valid;
  pos_t            best_pos;
  sad_unit #(.TAGW(2*CW)) u_sad (
    .clk, .rst_n, .in_valid(line1_valid), .a(line1_data), .b(r1_rdata),
    .last(rc_last_d), .tag_in(rc_cand_d), .score, .score_valid, .tag_out(score_tag));
  sad_comparator u_cmp (
    .clk, .rst_n, .start(n_valid), .n_comp, .score_valid, .score, .cand(pos_t'(score_tag)),
    .best_pos, .min_score, .best_valid);

  mv_calculator u_mvc (.cur_pos(mb_pos), .best_pos, .mv);

  // pipeline registers matching the one-clock memory latency
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cc_valid_d <= 1'b0;
      cc_idx_d   <= '0;
      rc_idx_d   <= '0;
      rc_last_d  <= 1'b0;
      rc_cand_d  <= '0;
      rc_cand    <= '0;
      rc_start_q <= 1'b0;
    end else begin
      cc_valid_d <= cc_busy;
      cc_idx_d   <= cc_idx;
      rc_idx_d   <= rc_idx;
      rc_last_d  <= rc_last;
      rc_cand_d  <= rc_cand;
      rc_start_q <= rc_start;
      if (rc_start) rc_cand <= cand;
    end
  end

  // sequencing
  // frame_done clears the loaded flags one clock later: no restart meanwhile
  assign scan_clr    = (state == S_IDLE) && !frame_done && cur_loaded && ref_loaded;
  assign frame_start = scan_clr;
  assign cc_start    = (state == S_WAITPOS) && scan_valid;
  assign fs_start    = (state == S_LOADCUR) && cc_done;
  assign mv_valid    = (state == S_MV);
  assign scan_incr   = (state == S_WAITMC) && mc_mb_done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      mb_pos      <= '0;
      copy_cnt    <= '0;
      frame_done  <= 1'b0;
      n_comp_last <= '0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        S_IDLE:    if (scan_clr) state <= S_WAITPOS;
        S_WAITPOS: begin
          if (scan_valid) begin
            mb_pos <= scan_pos;
            state  <= S_LOADCUR;
          end else if (scan_done) begin
            frame_done <= 1'b1;
            state      <= S_IDLE;
          end
        end
        S_LOADCUR: if (cc_done) state <= S_SEARCH;
        S_SEARCH: begin
          if (n_valid) n_comp_last <= n_comp;
          if (best_valid) begin
            copy_cnt <= '0;
            state    <= S_COPY;
          end
        end
        S_COPY: begin
          copy_cnt <= copy_cnt + 1'b1;
          if (copy_cnt == 9'd255) state <= S_MV;
        end
        S_MV:      if (mv_ready) state <= S_WAITMC;
        S_WAITMC:  if (mc_mb_done) state <= S_WAITPOS;
        default:   state <= S_IDLE;
      endcase
    end
  end

  // the reference memory read port is never requested by both sides at once
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(rc_busy && mc_re)) else $error("reference read port conflict");
  end
endmodule
