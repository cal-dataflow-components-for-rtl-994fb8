// tb_cavlc_analysis: the combinational analysis stages of the CAVLC coder
// (counter, zeros-run counter, splitter, N calculator, table
// selector) on random zigzag-ordered blocks of varied density, against a
// direct model of the CAVLC definitions.
module tb_cavlc_analysis;
  import cavlc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  coefs_t zz, rs;
  logic [4:0] total_coeffs, total_zeros, n_lev, nu, nl, nc;
  logic [1:0] trailing_ones, n_t1, avail, ti;
  logic [3:0] run_before [16];
  logic [4:0] zeros_left [16];
  logic [2:0] t1_neg;
  coef_t levels [16];

  cavlc_counter u_cnt (.zz, .total_coeffs, .trailing_ones, .total_zeros);
  // the coder's reverse-order wiring
  always_comb begin
    for (int i = 0; i < 16; i++) rs[i] = zz[15 - i];
  end
  cavlc_zeros_run_counter u_zr (.rs, .run_before, .zeros_left);
  cavlc_splitter u_split (.rs, .t1_neg, .n_t1, .levels, .n_lev);
  cavlc_n_calculator u_nc (.nu, .nl, .avail, .nc);
  cavlc_table_selector u_ts (.nc, .ti);

  initial begin
    for (int b = 0; b < 3000; b++) begin
      int z [16], lev [16], pos [16], tc, t1, tz, zl, d;
      d = b % 5;
      for (int k = 0; k < 16; k++) begin
        z[k] = ($urandom_range(4) < d) ? int'($urandom_range(8)) - 4 : 0;
        if (b % 7 == 0 && z[k] != 0) z[k] = $urandom_range(1) ? 1 : -1;
        zz[k] = coef_t'(z[k]);
      end
      tc = 0;
      for (int k = 15; k >= 0; k--) if (z[k] != 0) begin lev[tc] = z[k]; pos[tc] = k; tc++; end
      t1 = 0;
      for (int i = 0; i < tc && t1 < 3; i++) begin
        if (lev[i] == 1 || lev[i] == -1) t1++;
        else break;
      end
      tz = 0;
      if (tc > 0) for (int k = 0; k < pos[0]; k++) if (z[k] == 0) tz++;
      #1;
      check(int'(total_coeffs) == tc && int'(trailing_ones) == t1 && int'(total_zeros) == tz, "counter");
      zl = tz;
      for (int i = 0; i < tc; i++) begin
        int run;
        run = (i == tc - 1) ? zl : pos[i] - pos[i + 1] - 1;
        check(int'(zeros_left[i]) == zl, $sformatf("block %0d zeros_left[%0d]", b, i));
        if (i < tc - 1) check(int'(run_before[i]) == run, $sformatf("block %0d run_before[%0d]", b, i));
        zl -= run;
      end
      check(int'(n_t1) == t1 && int'(n_lev) == tc - t1, "splitter counts");
      for (int i = 0; i < t1; i++) check(t1_neg[i] == (lev[i] < 0), "trailing-one sign");
      for (int i = 0; i < tc - t1; i++) check(int'(levels[i]) == lev[t1 + i], "levels");
      nu = 5'($urandom_range(16)); nl = 5'($urandom_range(16)); avail = 2'($urandom_range(3));
      #1;
      begin
        int e;
        e = avail == 3 ? (nu + nl + 1) >> 1 : avail == 2 ? nu : avail == 1 ? nl : 0;
        check(int'(nc) == e, "nC");
        check(int'(ti) == (e < 2 ? 0 : e < 4 ? 1 : e < 8 ? 2 : 3), "table selector");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
