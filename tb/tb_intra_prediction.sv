// tb_intra_prediction: random and extreme neighbour sets, alternately 4x4
// and 16x16 blocks, with random gaps in the sample stream. Every output row
// of four predictors is compared with a reference model of the H.264 luma
// intra modes written here from the standard's equations (all neighbours
// available), and every (mode, row, column) of each block must appear
// exactly once. Coverage: each 4x4 and 16x16 mode, plane clipping at 0 and
// 255.
module tb_intra_prediction;
  import intra_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n = 0, sample_valid = 0, sample_ready, pred_valid, block_done;
  blk_t blk = BLK4, pred_blk;
  logic [7:0] sample = '0;
  logic [7:0] pred [NUM_PE];
  logic [3:0] pred_mode, pred_row, pred_col;

  intra_prediction dut (.*);

  // neighbours: top[0..15] (4x4 uses 0..7 as A..H), left[0..15], corner
  int top [16], left [16], corner;
  int seen [9][16][16];
  int mode_cnt [2][9];
  int n_clip_lo = 0, n_clip_hi = 0, n_blocks_done = 0;

  function automatic int pt(int x, int y);  // p[x,y] with x or y = -1
    if (y == -1) return (x == -1) ? corner : top[x];
    return left[y];
  endfunction

  function automatic int ref4(int m, int x, int y);
    int z, s;
    case (m)
      0: return pt(x, -1);
      1: return pt(-1, y);
      2: begin
        s = 4;
        for (int i = 0; i < 4; i++) s += pt(i, -1) + pt(-1, i);
        return s >> 3;
      end
      3: if (x == 3 && y == 3) return (pt(6, -1) + 3 * pt(7, -1) + 2) >> 2;
         else return (pt(x + y, -1) + 2 * pt(x + y + 1, -1) + pt(x + y + 2, -1) + 2) >> 2;
      4: if (x > y) return (pt(x - y - 2, -1) + 2 * pt(x - y - 1, -1) + pt(x - y, -1) + 2) >> 2;
         else if (x < y) return (pt(-1, y - x - 2) + 2 * pt(-1, y - x - 1) + pt(-1, y - x) + 2) >> 2;
         else return (pt(0, -1) + 2 * pt(-1, -1) + pt(-1, 0) + 2) >> 2;
      5: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0) return (pt(x - (y >> 1) - 1, -1) + pt(x - (y >> 1), -1) + 1) >> 1;
        if (z > 0) return (pt(x - (y >> 1) - 2, -1) + 2 * pt(x - (y >> 1) - 1, -1) + pt(x - (y >> 1), -1) + 2) >> 2;
        if (z == -1) return (pt(-1, 0) + 2 * pt(-1, -1) + pt(0, -1) + 2) >> 2;
        return (pt(-1, y - 1) + 2 * pt(-1, y - 2) + pt(-1, y - 3) + 2) >> 2;
      end
      6: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0) return (pt(-1, y - (x >> 1) - 1) + pt(-1, y - (x >> 1)) + 1) >> 1;
        if (z > 0) return (pt(-1, y - (x >> 1) - 2) + 2 * pt(-1, y - (x >> 1) - 1) + pt(-1, y - (x >> 1)) + 2) >> 2;
        if (z == -1) return (pt(-1, 0) + 2 * pt(-1, -1) + pt(0, -1) + 2) >> 2;
        return (pt(x - 1, -1) + 2 * pt(x - 2, -1) + pt(x - 3, -1) + 2) >> 2;
      end
      7: if (y % 2 == 0) return (pt(x + (y >> 1), -1) + pt(x + (y >> 1) + 1, -1) + 1) >> 1;
         else return (pt(x + (y >> 1), -1) + 2 * pt(x + (y >> 1) + 1, -1) + pt(x + (y >> 1) + 2, -1) + 2) >> 2;
      default: begin
        z = x + 2 * y;
        if (z < 5 && z % 2 == 0) return (pt(-1, y + (x >> 1)) + pt(-1, y + (x >> 1) + 1) + 1) >> 1;
        if (z < 5) return (pt(-1, y + (x >> 1)) + 2 * pt(-1, y + (x >> 1) + 1) + pt(-1, y + (x >> 1) + 2) + 2) >> 2;
        if (z == 5) return (pt(-1, 2) + 3 * pt(-1, 3) + 2) >> 2;
        return pt(-1, 3);
      end
    endcase
  endfunction

  function automatic int ref16(int m, int x, int y);
    int s, h, v, a, b, c;
    case (m)
      0: return top[x];
      1: return left[y];
      2: begin
        s = 16;
        for (int i = 0; i < 16; i++) s += top[i] + left[i];
        return s >> 5;
      end
      default: begin
        h = 0; v = 0;
        for (int i = 0; i < 8; i++) begin
          h += (i + 1) * (pt(8 + i, -1) - pt(6 - i, -1));
          v += (i + 1) * (pt(-1, 8 + i) - pt(-1, 6 - i));
        end
        a = 16 * (left[15] + top[15]);
        b = (5 * h + 32) >>> 6;
        c = (5 * v + 32) >>> 6;
        s = (a + b * (x - 7) + c * (y - 7) + 16) >>> 5;
        return s < 0 ? 0 : (s > 255 ? 255 : s);
      end
    endcase
  endfunction

  function automatic int raw_plane(int x, int y);
    int h, v, a, b, c;
    h = 0; v = 0;
    for (int i = 0; i < 8; i++) begin
      h += (i + 1) * (pt(8 + i, -1) - pt(6 - i, -1));
      v += (i + 1) * (pt(-1, 8 + i) - pt(-1, 6 - i));
    end
    a = 16 * (left[15] + top[15]);
    b = (5 * h + 32) >>> 6;
    c = (5 * v + 32) >>> 6;
    return (a + b * (x - 7) + c * (y - 7) + 16) >>> 5;
  endfunction

  blk_t cur_blk;
  always @(posedge clk) begin
    if (rst_n && pred_valid) begin
      int m, r, c0, e, rp;
      m = pred_mode; r = pred_row; c0 = pred_col;
      check(pred_blk == cur_blk, "block size tag");
      for (int k = 0; k < 4; k++) begin
        if (cur_blk == BLK4) e = ref4(m, c0 + k, r);
        else begin
          e = ref16(m, c0 + k, r);
          if (m == 3) begin
            rp = raw_plane(c0 + k, r);
            if (rp < 0) n_clip_lo++;
            if (rp > 255) n_clip_hi++;
          end
        end
        check(int'(pred[k]) == e, $sformatf("%s mode %0d row %0d col %0d: %0d exp %0d",
              cur_blk == BLK4 ? "4x4" : "16x16", m, r, c0 + k, pred[k], e));
      end
      if (m < 9 && r < 16 && c0 < 16) seen[m][r][c0]++;
      if (m < 9) mode_cnt[cur_blk == BLK16][m]++;
    end
    if (rst_n && block_done) n_blocks_done++;
  end

  task automatic send(input int v);
    @(negedge clk);
    sample_valid = 0;
    while ($urandom_range(3) == 0) @(negedge clk);
    sample_valid = 1; sample = 8'(v);
    #1;
    while (!sample_ready) begin
      @(negedge clk);
      #1;
    end
  endtask

  task automatic run_block(input blk_t b, input int kind);
    int nm, nr, nc;
    for (int i = 0; i < 16; i++) begin
      case (kind)
        0: begin top[i] = $urandom_range(255); left[i] = $urandom_range(255); end
        1: begin top[i] = 255; left[i] = 255; end
        2: begin top[i] = i * 17; left[i] = i * 17; end         // steep plane, clips high
        default: begin top[i] = 255 - i * 17; left[i] = 255 - i * 17; end
      endcase
    end
    corner = (kind == 0) ? $urandom_range(255) : (kind == 1 ? 255 : (kind == 2 ? 0 : 255));
    foreach (seen[m, r, c]) seen[m][r][c] = 0;
    cur_blk = b;
    @(negedge clk);
    blk = b;
    if (b == BLK4) begin
      send(corner);
      for (int i = 0; i < 8; i++) send(top[i]);
      for (int i = 0; i < 4; i++) send(left[i]);
    end else begin
      for (int i = 0; i < 16; i++) send(top[i]);
      send(corner);
      for (int i = 0; i < 16; i++) send(left[i]);
    end
    @(negedge clk) sample_valid = 0;
    wait (block_done);
    repeat (4) @(negedge clk);
    nm = (b == BLK4) ? 9 : 4; nr = (b == BLK4) ? 4 : 16; nc = (b == BLK4) ? 1 : 4;
    for (int m = 0; m < nm; m++)
      for (int r = 0; r < nr; r++)
        for (int c = 0; c < nc; c++)
          check(seen[m][r][c * 4] == 1, $sformatf("mode %0d row %0d col %0d issued %0d times", m, r, c * 4, seen[m][r][c * 4]));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) run_block(t % 2 ? BLK16 : BLK4, t < 32 ? 0 : (t - 32) / 2 % 4);
    for (int m = 0; m < 9; m++) check(mode_cnt[0][m] > 0, $sformatf("4x4 mode %0d seen", m));
    for (int m = 0; m < 4; m++) check(mode_cnt[1][m] > 0, $sformatf("16x16 mode %0d seen", m));
    check(n_clip_lo > 0 && n_clip_hi > 0, "plane clipping at both ends");
    check(n_blocks_done == 40, "block_done count");
    $display("coverage: clip_lo=%0d clip_hi=%0d blocks=%0d", n_clip_lo, n_clip_hi, n_blocks_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
