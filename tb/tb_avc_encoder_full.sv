// tb_avc_encoder_full: the same end-to-end test on the top with its
// default parameters: a QCIF (176x144, 99 MBs) frame and a +/-8 search
// range, the configuration of the document's Foreman experiments.
// Inter path: a random reference frame and a current frame that is the
// reference displaced by (2,-1) with a sprinkling of changed pixels are
// loaded; every motion vector's SAD must equal the minimum of a full search
// computed here and the vector must reach it; the compensated stream must
// be the reference at MB + vector and the error current - compensated.
// The stream is then fed back unchanged (a lossless stand-in for the
// transform path) as the reconstruction, becoming the reference of a
// second frame, which is checked the same way.
// Meanwhile the other engines work on data taken from the same frames:
// intra prediction of 4x4 and 16x16 blocks whose neighbours are frame
// pixels (DC and vertical/horizontal predictors checked, every mode
// counted), the Exp-Golomb coder on the motion vectors (se), the intra
// modes (ue), a coded-block-pattern (me) and a te flag (codeword lengths
// checked), and CAVLC on 4x4 blocks of the compensation error (one block
// per MB, clamped; bit count per block and TotalCoeffs checked).
// Each mechanism is counted and a mechanism that never occurred is a
// failure.
module tb_avc_encoder_full;
  import me_pkg::*;
  import intra_pkg::*;
  import eg_pkg::*;
  import cavlc_pkg::*;
  localparam int W = 176, H = 144, SR = 8, AW = $clog2(W * H), NMB = (W / 16) * (H / 16);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask
  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n = 0;
  logic in_valid = 0, in_ready, flip = 0;
  logic [7:0] in_data = '0;
  logic mv_valid, comp_valid, me_frame_done, mc_frame_done, mc_stall;
  mv_t mv;
  pos_t mv_pos;
  logic [SADW-1:0] mv_score;
  logic [AW-1:0] comp_addr;
  logic [7:0] comp_pixel;
  logic signed [8:0] comp_err;
  logic rec_valid = 0;
  logic [AW-1:0] rec_addr = '0;
  logic [7:0] rec_comp = '0;
  logic signed [8:0] rec_err = '0;
  blk_t ip_blk = BLK4, ip_pred_blk;
  logic ip_sample_valid = 0, ip_sample_ready, ip_pred_valid, ip_block_done;
  logic [7:0] ip_sample = '0;
  logic [7:0] ip_pred [NUM_PE];
  logic [3:0] ip_pred_mode, ip_pred_row, ip_pred_col;
  logic eg_valid = 0, eg_ready, eg_bit_valid, eg_bit, eg_bit_last;
  eg_type_t eg_type = EG_UE;
  logic [VW-1:0] eg_value = '0, eg_range = '0;
  pmode_t eg_pmode = PM_INTRA;
  logic [1:0] eg_cat = 2'd1;
  logic cv_coef_valid = 0, cv_coef_ready, cv_bit_valid, cv_bit, cv_blk_last;
  coef_t cv_coef = '0;
  logic [4:0] cv_nu = '0, cv_nl = '0, cv_total_coeffs;
  logic [1:0] cv_avail = '0;

  avc_encoder dut (.*);

  byte unsigned refr [W * H], cur [W * H];
  int mvx [NMB], mvy [NMB], got_mv = 0, n_comp = 0;
  logic [AW-1:0] s_addr [W * H];
  byte unsigned s_comp [W * H];
  int s_err [W * H];
  // mechanism counters
  int c_mv = 0, c_mv_nonzero = 0, c_comp = 0, c_rec = 0, c_mc_wait = 0, c_frames = 0;
  int c_ip4 [9], c_ip16 [4], c_ip_blocks = 0;
  int c_eg [4], c_eg_raw = 0, c_eg_bits = 0, c_eg_words = 0, eg_exp_bits = 0;
  int c_cv_sent = 0, c_cv_blocks = 0, c_cv_bits = 0, c_cv_nonzero_blocks = 0, c_cv_ti [4];
  int cv_exp_tc [$];

  function automatic int sad(int mx, int my, int rx, int ry);
    int s;
    s = 0;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        int d;
        d = int'(cur[(my + y) * W + mx + x]) - int'(refr[(ry + y) * W + rx + x]);
        s += d < 0 ? -d : d;
      end
    return s;
  endfunction

  function automatic int ue_len(int cn);
    return 2 * ($clog2(cn + 2) - 1) + 1;
  endfunction

  // ---------------- monitors
  always @(negedge clk) if (rst_n && dut.u_inter.u_mc.wait_mv && !mv_valid) c_mc_wait++;

  always @(posedge clk) begin
    if (rst_n && mv_valid && dut.u_inter.u_me.mv_ready) begin
      int mb, best, mx, my, s;
      mx = mv_pos.x; my = mv_pos.y;
      mb = (my / 16) * (W / 16) + mx / 16;
      best = 1 << 30;
      for (int ry = (my - SR < 0 ? 0 : my - SR); ry <= (my + SR > H - 16 ? H - 16 : my + SR); ry++)
        for (int rx = (mx - SR < 0 ? 0 : mx - SR); rx <= (mx + SR > W - 16 ? W - 16 : mx + SR); rx++) begin
          s = sad(mx, my, rx, ry);
          if (s < best) best = s;
        end
      check(int'(mv_score) == best, $sformatf("MB (%0d,%0d) SAD %0d, full search %0d", mx, my, mv_score, best));
      check(sad(mx, my, mx + mv.x, my + mv.y) == int'(mv_score), "vector reaches its SAD");
      mvx[mb] = mv.x; mvy[mb] = mv.y; got_mv++; c_mv++;
      if (mv.x != 0 || mv.y != 0) c_mv_nonzero++;
    end
    if (rst_n && comp_valid) begin
      s_addr[n_comp] = comp_addr; s_comp[n_comp] = comp_pixel; s_err[n_comp] = comp_err;
      n_comp++; c_comp++;
    end
    if (rst_n && ip_pred_valid) begin
      if (ip_pred_blk == BLK4 && ip_pred_mode < 9) c_ip4[ip_pred_mode]++;
      if (ip_pred_blk == BLK16 && ip_pred_mode < 4) c_ip16[ip_pred_mode]++;
      ip_check();
    end
    if (rst_n && ip_block_done) c_ip_blocks++;
    if (rst_n && eg_bit_valid) begin
      c_eg_bits++;
      if (eg_bit_last) c_eg_words++;
    end
    if (rst_n && cv_bit_valid) begin
      c_cv_bits++;
      if (cv_blk_last) begin
        c_cv_blocks++;
        check(cv_exp_tc.size() > 0 && int'(cv_total_coeffs) == cv_exp_tc.pop_front(), "CAVLC TotalCoeffs");
      end
    end
  end

  // ---------------- intra: neighbours and the simple predictors
  int nb_top [16], nb_left [16], nb_corner, nb_kind;
  task automatic ip_check();
    int s, n, e;
    for (int k = 0; k < 4; k++) begin
      int x;
      x = ip_pred_col + k;
      n = (ip_pred_blk == BLK4) ? 4 : 16;
      case (ip_pred_mode)
        0: e = nb_top[x];
        1: e = nb_left[ip_pred_row];
        2: begin
          s = n;
          for (int i = 0; i < n; i++) s += nb_top[i] + nb_left[i];
          e = s >> (n == 4 ? 3 : 5);
        end
        default: e = -1;
      endcase
      if (e >= 0) check(int'(ip_pred[k]) == e, $sformatf("intra mode %0d row %0d col %0d", ip_pred_mode, ip_pred_row, x));
    end
  endtask

  task automatic ip_send(input int v);
    @(negedge clk);
    ip_sample_valid = 1; ip_sample = 8'(v);
    #1;
    while (!ip_sample_ready) begin
      @(negedge clk);
      #1;
    end
  endtask

  task automatic intra_job(input int bx, input int by, input blk_t b);
    int n;
    n = (b == BLK4) ? 4 : 16;
    wait (!ip_pred_valid);
    for (int i = 0; i < 16; i++) begin
      nb_top[i] = cur[(by - 1) * W + bx + i];
      nb_left[i] = cur[(by + (i < n ? i : n - 1)) * W + bx - 1];
    end
    nb_corner = cur[(by - 1) * W + bx - 1];
    @(negedge clk) ip_blk = b;
    if (b == BLK4) begin
      ip_send(nb_corner);
      for (int i = 0; i < 8; i++) ip_send(nb_top[i]);
      for (int i = 0; i < 4; i++) ip_send(nb_left[i]);
    end else begin
      for (int i = 0; i < 16; i++) ip_send(nb_top[i]);
      ip_send(nb_corner);
      for (int i = 0; i < 16; i++) ip_send(nb_left[i]);
    end
    @(negedge clk) ip_sample_valid = 0;
    @(posedge ip_block_done);
    repeat (3) @(negedge clk);
  endtask

  // ---------------- Exp-Golomb
  task automatic eg_send(input eg_type_t t, input int v, input int r, input pmode_t p, input int cn);
    @(negedge clk);
    eg_valid = 1; eg_type = t; eg_value = VW'(v); eg_range = VW'(r); eg_pmode = p;
    #1;
    while (!eg_ready) begin
      @(negedge clk);
      #1;
    end
    c_eg[t]++;
    if (t == EG_TE && r == 1) begin c_eg_raw++; eg_exp_bits += 1; end
    else eg_exp_bits += ue_len(cn);
    @(negedge clk) eg_valid = 0;
  endtask

  // ---------------- CAVLC on error blocks
  task automatic cavlc_job(input int i0, input int av);
    int c [16], tc, u, l, nc;
    tc = 0;
    for (int k = 0; k < 16; k++) begin
      int e;
      e = s_err[i0 + k];
      c[k] = (e > -4 && e < 4) ? 0 : e;   // coarse "quantisation"
      if (c[k] != 0) tc++;
    end
    u = av == 2 ? 5 : (av == 3 ? 8 : 0); l = av == 1 ? 3 : (av == 3 ? 12 : 0);   // nC 0, 3, 5, 10
    nc = av == 3 ? (u + l + 1) >> 1 : av == 2 ? u : av == 1 ? l : 0;
    c_cv_ti[nc < 2 ? 0 : nc < 4 ? 1 : nc < 8 ? 2 : 3]++;
    if (tc > 0) c_cv_nonzero_blocks++;
    cv_exp_tc.push_back(tc);
    c_cv_sent++;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      cv_coef_valid = 1; cv_coef = coef_t'(c[k]); cv_nu = 5'(u); cv_nl = 5'(l); cv_avail = 2'(av);
      #1;
      while (!cv_coef_ready) begin
        @(negedge clk);
        #1;
      end
    end
    @(negedge clk) cv_coef_valid = 0;
  endtask

  task automatic load(input bit f, input byte unsigned img [W * H]);
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      in_valid = 1; flip = f; in_data = img[i];
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
    end
    @(negedge clk) in_valid = 0;
  endtask

  task automatic inter_frame(input int fr);
    got_mv = 0; n_comp = 0;
    @(posedge mc_frame_done);
    @(negedge clk);
    c_frames++;
    check(got_mv == NMB, $sformatf("frame %0d: %0d vectors", fr, got_mv));
    check(n_comp == W * H, $sformatf("frame %0d: %0d output pixels", fr, n_comp));
    for (int i = 0; i < n_comp; i++) begin
      int a, x, y, mb;
      a = s_addr[i]; x = a % W; y = a / W;
      mb = (y / 16) * (W / 16) + x / 16;
      check(s_comp[i] == refr[(y + mvy[mb]) * W + x + mvx[mb]], $sformatf("frame %0d compensated pixel %0d", fr, a));
      check(s_err[i] == int'(cur[a]) - int'(s_comp[i]), $sformatf("frame %0d error %0d", fr, a));
    end
  endtask

  task automatic side_jobs(input int fr);
    // intra on frame blocks, EG on vectors and modes, CAVLC on errors
    for (int m = 0; m < NMB && m < 6; m++) begin
      int bx, by;
      bx = 16 * (m % (W / 16)) + 16; by = 16 * (m / (W / 16)) + 16;
      if (bx < W && by < H) begin
        intra_job(bx, by, m % 2 ? BLK16 : BLK4);
      end
    end
    for (int m = 0; m < NMB; m++) begin
      eg_send(EG_SE, mvx[m], 0, PM_INTER, mvx[m] > 0 ? 2 * mvx[m] - 1 : -2 * mvx[m]);
      eg_send(EG_SE, mvy[m], 0, PM_INTER, mvy[m] > 0 ? 2 * mvy[m] - 1 : -2 * mvy[m]);
    end
    for (int k = 0; k < 9; k++) eg_send(EG_UE, k, 0, PM_INTRA, k);
    eg_send(EG_ME, 47, 0, PM_INTRA, 0);   // cbp 47 is code_num 0 for Intra_4x4
    eg_send(EG_ME, 0, 0, PM_INTER, 0);    // cbp 0 is code_num 0 for Inter
    eg_send(EG_TE, fr % 2, 1, PM_INTRA, 0);
    eg_send(EG_TE, 2, 3, PM_INTRA, 2);
    for (int m = 0; m < NMB && m < 24; m++) cavlc_job(m * 256, (m + fr) % 4);
  endtask

  initial begin
    byte unsigned nxt [W * H];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < W * H; i++) refr[i] = 8'($urandom);
    for (int i = 0; i < W * H; i++) begin
      int x, y;
      x = i % W + 2; y = i / W - 1;
      if (x > W - 1) x = W - 1;
      if (y < 0) y = 0;
      cur[i] = refr[y * W + x];
      if (i % 37 == 5) cur[i] = 8'(i * 29);
    end
    load(1, refr);
    load(0, cur);
    inter_frame(1);
    fork
      side_jobs(1);
      for (int i = 0; i < W * H; i++) begin
        @(negedge clk);
        rec_valid = 1; rec_addr = s_addr[i]; rec_comp = s_comp[i]; rec_err = 9'(s_err[i]);
        c_rec++;
      end
    join
    @(negedge clk) rec_valid = 0;
    for (int i = 0; i < W * H; i++) begin
      int x, y;
      x = i % W - 1; y = i / W + 2;
      if (x < 0) x = 0;
      if (y > H - 1) y = H - 1;
      nxt[i] = cur[y * W + x];
    end
    refr = cur;
    cur = nxt;
    load(0, cur);
    inter_frame(2);
    side_jobs(2);
    repeat (2000) @(negedge clk);
    check(c_eg_bits == eg_exp_bits, $sformatf("Exp-Golomb bits %0d, expected %0d", c_eg_bits, eg_exp_bits));
    check(c_cv_blocks == c_cv_sent, "CAVLC blocks");
    check(cv_exp_tc.size() == 0, "every CAVLC block coded");
    // mechanisms
    check(c_frames == 2, "two inter frames");
    check(c_mv == 2 * NMB && c_mv_nonzero > 0, "motion vectors, some non-zero");
    check(c_mc_wait > 0, "compensator waited for the estimator");
    check(c_rec == W * H, "reconstruction written back");
    for (int m = 0; m < 9; m++) check(c_ip4[m] > 0, $sformatf("intra 4x4 mode %0d", m));
    for (int m = 0; m < 4; m++) check(c_ip16[m] > 0, $sformatf("intra 16x16 mode %0d", m));
    for (int t = 0; t < 4; t++) check(c_eg[t] > 0, $sformatf("Exp-Golomb type %0d", t));
    check(c_eg_raw > 0, "single-bit te");
    check(c_cv_blocks > 0 && c_cv_nonzero_blocks > 0 && c_cv_bits > 0, "CAVLC blocks coded");
    for (int t = 0; t < 4; t++) check(c_cv_ti[t] > 0, $sformatf("coeff_token table %0d", t));
    $display("mechanisms: frames=%0d mv=%0d mv_nonzero=%0d mc_wait=%0d comp=%0d rec=%0d intra_blocks=%0d eg_words=%0d eg_bits=%0d te_raw=%0d cavlc_blocks=%0d cavlc_bits=%0d",
             c_frames, c_mv, c_mv_nonzero, c_mc_wait, c_comp, c_rec, c_ip_blocks, c_eg_words, c_eg_bits, c_eg_raw, c_cv_blocks, c_cv_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
