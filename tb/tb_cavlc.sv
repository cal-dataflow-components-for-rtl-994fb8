// tb_cavlc: blocks of quantised coefficients through the CAVLC coder, with
// random neighbour counts and input gaps. Each block's bitstream is
// compared with a reference encoder written here: zigzag scan, TotalCoeffs
// and TrailingOnes, coeff_token, trailing-one signs, levels with
// suffixLength adaptation and escapes, total_zeros and run_before, as
// specified for H.264 CAVLC. The reference takes the VLC codewords from the
// coder's table package (those tables are separately checked to be
// prefix-free and complete); the first block is the worked textbook example
// [0 3 -1 0; 0 -1 1 0; 1 0 0 0; 0 0 0 0] with nC = 0, whose bitstream
// 000010001110010111101101 is checked literally.
// Coverage: each coeff_token table, empty and full blocks, three trailing
// ones, level escapes (prefix 14 and 15), suffixLength reaching 6,
// run_before with zerosLeft > 6.
module tb_cavlc;
  import cavlc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n = 0, coef_valid = 0, coef_ready, bit_valid, bit_out, blk_last;
  coef_t coef = '0;
  logic [4:0] nu = '0, nl = '0, total_coeffs;
  logic [1:0] avail = '0;

  cavlc dut (.*);

  bit exp_bits [$];
  int exp_tc [$];
  int n_ti [4], n_empty = 0, n_full = 0, n_t1_3 = 0, n_esc14 = 0, n_esc15 = 0, n_sl6 = 0, n_zl7 = 0;
  int n_bits = 0, n_blocks = 0;

  function automatic void put(int v, int len);
    for (int i = len - 1; i >= 0; i--) exp_bits.push_back(1'(v >> i));
  endfunction

  function automatic void encode(int c [16], int nc);
    int z [16], tc, t1, ti, tz, last, sl, lc, lvl, mag, idx, nlev, zl, run;
    int lev [16], pos [16];
    for (int k = 0; k < 16; k++) z[k] = c[ZIGZAG[k]];
    // nonzero coefficients, highest frequency first
    tc = 0;
    for (int k = 15; k >= 0; k--) if (z[k] != 0) begin lev[tc] = z[k]; pos[tc] = k; tc++; end
    t1 = 0;
    for (int i = 0; i < tc && t1 < 3; i++) begin
      if (lev[i] == 1 || lev[i] == -1) t1++;
      else break;
    end
    ti = nc < 2 ? 0 : nc < 4 ? 1 : nc < 8 ? 2 : 3;
    n_ti[ti]++;
    if (tc == 0) n_empty++;
    if (tc == 16) n_full++;
    if (t1 == 3) n_t1_3++;
    idx = ti * 68 + tc * 4 + t1;
    put(CT_VAL[idx], CT_VBW[idx]);
    if (tc == 0) return;
    for (int i = 0; i < t1; i++) put(lev[i] < 0, 1);
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int i = t1; i < tc; i++) begin
      lvl = lev[i];
      mag = lvl < 0 ? -lvl : lvl;
      lc = lvl > 0 ? 2 * lvl - 2 : -2 * lvl - 1;
      if (i == t1 && t1 < 3) lc -= 2;
      if (sl == 0) begin
        if (lc < 14) put(1, lc + 1);
        else if (lc < 30) begin put(1, 15); put(lc - 14, 4); n_esc14++; end
        else begin put(1, 16); put(lc - 30, 12); n_esc15++; end
      end else begin
        if (lc < (15 << sl)) begin put(1, (lc >> sl) + 1); put(lc & ((1 << sl) - 1), sl); end
        else begin put(1, 16); put(lc - (15 << sl), 12); n_esc15++; end
      end
      if (sl == 0) sl = 1;
      if (mag > (3 << (sl - 1)) && sl < 6) sl++;
      if (sl == 6) n_sl6++;
    end
    last = pos[0];
    tz = 0;
    for (int k = 0; k < last; k++) if (z[k] == 0) tz++;
    if (tc < 16) put(TZ_VAL[(tc - 1) * 16 + tz], TZ_VBW[(tc - 1) * 16 + tz]);
    zl = tz;
    for (int i = 0; i < tc - 1 && zl > 0; i++) begin
      run = pos[i] - pos[i + 1] - 1;
      if (zl > 6) n_zl7++;
      idx = ((zl > 7 ? 7 : zl) - 1) * 16 + run;
      put(RB_VAL[idx], RB_VBW[idx]);
      zl -= run;
    end
  endfunction

  // output monitor
  always @(posedge clk) begin
    if (rst_n && bit_valid) begin
      n_bits++;
      if (exp_bits.size() == 0) check(0, "unexpected bit");
      else begin
        bit b;
        b = exp_bits.pop_front();
        check(bit_out == b, $sformatf("block %0d bit mismatch", n_blocks));
      end
      if (blk_last) begin
        n_blocks++;
        check(exp_tc.size() > 0 && int'(total_coeffs) == exp_tc.pop_front(), "total_coeffs");
        check(exp_bits.size() == 0 || n_blocks < n_sent, "block ends where expected");
      end
    end
  end

  int n_sent = 0;
  task automatic send_block(input int c [16], input int u, input int l, input int av);
    int nc, tc;
    nc = av == 3 ? (u + l + 1) >> 1 : av == 2 ? u : av == 1 ? l : 0;
    tc = 0;
    foreach (c[k]) if (c[k] != 0) tc++;
    wait (exp_bits.size() == 0);
    encode(c, nc);
    exp_tc.push_back(tc);
    n_sent++;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      coef_valid = 0;
      while ($urandom_range(4) == 0) @(negedge clk);
      coef_valid = 1; coef = coef_t'(c[k]);
      nu = 5'(u); nl = 5'(l); avail = 2'(av);
      #1;
      while (!coef_ready) begin
        @(negedge clk);
        #1;
      end
    end
    @(negedge clk) coef_valid = 0;
  endtask

  initial begin
    int c [16];
    bit known [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // textbook example, checked literally
    c = '{0, 3, -1, 0, 0, -1, 1, 0, 1, 0, 0, 0, 0, 0, 0, 0};
    encode(c, 0);
    known = exp_bits;
    exp_bits.delete();
    begin
      string s = "000010001110010111101101";
      bit ok;
      ok = known.size() == s.len();
      for (int i = 0; i < s.len() && ok; i++) ok = known[i] == (s[i] == "1");
      check(ok, "reference model reproduces the worked example");
    end
    send_block(c, 0, 0, 0);
    for (int b = 0; b < 600; b++) begin
      int kind, u, l, av;
      kind = b % 6;
      foreach (c[k]) begin
        case (kind)
          0: c[k] = $urandom_range(3) == 0 ? int'($urandom_range(4)) - 2 : 0;           // sparse, small
          1: c[k] = int'($urandom_range(6)) - 3;                                        // dense, small
          2: c[k] = $urandom_range(2) == 0 ? int'($urandom_range(80)) - 40 : 0;         // medium
          3: c[k] = (k < 3) ? int'($urandom_range(4000)) - 2000 : ($urandom_range(3) == 0 ? 1 : 0); // large
          4: c[k] = (k == 0 || k == 15) ? int'($urandom_range(2)) - 1 : 0;              // long zero runs
          default: c[k] = (b % 12 == 5) ? 0 : int'($urandom_range(1, 30)) * ($urandom_range(1) ? 1 : -1); // empty / full
        endcase
      end
      if (b % 12 == 11) begin
        int ramp [6] = '{100, 50, 26, 14, 8, 5};   // grows suffixLength to 6
        foreach (c[k]) c[ZIGZAG[k]] = (k >= 10) ? ramp[k - 10] : 200;
      end
      u = $urandom_range(16); l = $urandom_range(16); av = $urandom_range(3);
      send_block(c, u, l, av);
    end
    wait (exp_bits.size() == 0);
    repeat (50) @(negedge clk);
    check(n_blocks == n_sent, $sformatf("%0d blocks coded, %0d sent", n_blocks, n_sent));
    for (int t = 0; t < 4; t++) check(n_ti[t] > 0, $sformatf("coeff_token table %0d used", t));
    check(n_empty > 0 && n_full > 0 && n_t1_3 > 0, "empty, full and three-trailing-ones blocks");
    check(n_esc14 > 0 && n_esc15 > 0 && n_sl6 > 0 && n_zl7 > 0, "escapes, suffixLength 6, zerosLeft > 6");
    $display("coverage: ti=%0d/%0d/%0d/%0d empty=%0d full=%0d t1_3=%0d esc14=%0d esc15=%0d sl6=%0d zl7=%0d bits=%0d",
             n_ti[0], n_ti[1], n_ti[2], n_ti[3], n_empty, n_full, n_t1_3, n_esc14, n_esc15, n_sl6, n_zl7, n_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
