// tb_inter_prediction: two frames through the inter-prediction loop on a
// 48x32 frame (6 MBs) with a +/-4 search range.
// Frame 1: random reference R, current C = R displaced (plus noise on a few
// pixels). For every MB the best SAD must equal the minimum of a full
// search computed here, the reported vector must reach that SAD, the
// compensated stream must equal R at MB + vector and the error must be
// C - compensated. The reconstructed frame (compensated + error = C) is then
// written back through the reconstruction adder as the next reference, a
// new current frame C2 (C displaced the other way) is loaded, and frame 2 is
// checked against C as the reference, which proves the write-back.
// Coverage counters: cycles the MC waits for a vector (the ME never
// has to wait for the MC in this schedule), non-zero vectors,
// reconstruction writes.
module tb_inter_prediction;
  import me_pkg::*;
  localparam int W = 48, H = 32, SR = 4, AW = $clog2(W * H), NMB = (W / 16) * (H / 16);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n = 0, in_valid = 0, in_ready, flip = 0;
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

  inter_prediction #(.FRAME_W(W), .FRAME_H(H), .SEARCH_RANGE(SR)) dut (.*);

  byte unsigned refr [W * H], cur [W * H];
  int mvx [NMB], mvy [NMB], got_mv = 0, n_stall = 0, n_wait = 0, n_nonzero = 0, n_rec = 0, n_comp = 0;
  logic [AW-1:0] s_addr [W * H];
  byte unsigned s_comp [W * H];
  int s_err [W * H];

  function automatic int sad(int mx, int my, int rx, int ry);
    int s = 0;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        int d = int'(cur[(my + y) * W + mx + x]) - int'(refr[(ry + y) * W + rx + x]);
        s += d < 0 ? -d : d;
      end
    return s;
  endfunction

  always @(negedge clk) if (rst_n && mc_stall) n_stall++;
  always @(negedge clk) if (rst_n && dut.u_mc.wait_mv && !mv_valid) n_wait++;

  // monitor: motion vectors and the output stream
  always @(posedge clk) begin
    if (rst_n && mv_valid && dut.u_me.mv_ready) begin
      int mb, best, mx, my;
      mx = mv_pos.x; my = mv_pos.y;
      mb = (my / 16) * (W / 16) + mx / 16;
      best = 1 << 30;
      for (int ry = (my - SR < 0 ? 0 : my - SR); ry <= (my + SR > H - 16 ? H - 16 : my + SR); ry++)
        for (int rx = (mx - SR < 0 ? 0 : mx - SR); rx <= (mx + SR > W - 16 ? W - 16 : mx + SR); rx++) begin
          int s;
          s = sad(mx, my, rx, ry);
          if (s < best) best = s;
        end
      check(int'(mv_score) == best, $sformatf("t=%0t MB (%0d,%0d) score %0d, full search %0d", $time, mx, my, mv_score, best));
      check(sad(mx, my, mx + mv.x, my + mv.y) == int'(mv_score), "vector reaches the reported SAD");
      mvx[mb] = mv.x; mvy[mb] = mv.y; got_mv++;
      if (mv.x != 0 || mv.y != 0) n_nonzero++;
    end
    if (rst_n && comp_valid) begin
      s_addr[n_comp] = comp_addr; s_comp[n_comp] = comp_pixel; s_err[n_comp] = comp_err;
      n_comp++;
    end
  end

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

  task automatic run_frame(input int fr);
    got_mv = 0; n_comp = 0;
    fork
      begin
        @(posedge mc_frame_done);
        @(negedge clk);
      end
    join
    check(got_mv == NMB, $sformatf("frame %0d: %0d vectors", fr, got_mv));
    check(n_comp == W * H, $sformatf("frame %0d: %0d output pixels", fr, n_comp));
    for (int i = 0; i < n_comp; i++) begin
      int a, x, y, mb, rx, ry;
      a = s_addr[i]; x = a % W; y = a / W;
      mb = (y / 16) * (W / 16) + x / 16;
      rx = x + mvx[mb]; ry = y + mvy[mb];
      check(s_comp[i] == refr[ry * W + rx], $sformatf("frame %0d comp at %0d", fr, a));
      check(s_err[i] == int'(cur[a]) - int'(s_comp[i]), $sformatf("frame %0d err at %0d: %0d cur %0d comp %0d", fr, a, s_err[i], cur[a], s_comp[i]));
    end
  endtask

  initial begin
    byte unsigned nxt [W * H];
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (refr[i]) refr[i] = 8'($urandom);
    for (int i = 0; i < W * H; i++) begin
      int x, y;
      x = i % W + 2; y = i / W - 1;
      if (x > W - 1) x = W - 1;
      if (y < 0) y = 0;
      cur[i] = refr[y * W + x];
      if (i % 41 == 7) cur[i] = 8'(i * 37);
    end
    load(1, refr);
    load(0, cur);
    run_frame(1);
    // reconstruction: compensated + error written back as the next reference
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      rec_valid = 1; rec_addr = s_addr[i]; rec_comp = s_comp[i]; rec_err = 9'(s_err[i]);
      #1 check(!in_ready, "raw input held off during reconstruction");
      n_rec++;
    end
    @(negedge clk) rec_valid = 0;
    for (int i = 0; i < W * H; i++) begin
      int x, y;
      x = i % W - 3; y = i / W + 2;
      if (x < 0) x = 0;
      if (y > H - 1) y = H - 1;
      nxt[i] = cur[y * W + x];
    end
    refr = cur;
    cur = nxt;
    load(0, cur);
    run_frame(2);
    check(n_stall == 0, "MC always ready when a vector arrives");
    check(n_wait > 0, "MC waited for the ME");
    check(n_nonzero > 0, "non-zero vectors found");
    check(n_rec == W * H, "reconstruction writes");
    $display("coverage: stalls=%0d nonzero_mv=%0d rec=%0d", n_stall, n_nonzero, n_rec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
