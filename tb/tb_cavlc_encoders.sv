// tb_cavlc_encoders: the code-producing stages of the CAVLC coder:
// coeff_token, total_zeros and run_before encoders (which read the LUT
// memory model: ROM controller, code ROM, VBW ROM), checked against a few
// H.264 codewords written out here and against the complete tables; the
// sign encoder; and the level encoder's codeword and suffixLength
// adaptation over random level sequences, against a model of the
// standard's level coding rules.
module tb_cavlc_encoders;
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

  logic [1:0] ti, t1, ct_t1, sidx;
  logic [4:0] ct_tc, tz_tc, tz_tz, rb_zl, lv_tc;
  logic [3:0] rb_run;
  logic [2:0] t1_neg;
  code_t ct_code, tz_code, rb_code, s_code, l_code;
  logic rst_n = 0, init = 0, first = 0, next = 0;
  coef_t level = '0;

  cavlc_coeff_token_encoder u_ct (.ti, .total_coeffs(ct_tc), .trailing_ones(ct_t1), .code(ct_code));
  cavlc_total_zeros_encoder u_tz (.total_coeffs(tz_tc), .total_zeros(tz_tz), .code(tz_code));
  cavlc_run_before_encoder u_rb (.zeros_left(rb_zl), .run_before(rb_run), .code(rb_code));
  cavlc_sign_encoder u_sg (.t1_neg, .idx(sidx), .code(s_code));
  cavlc_level_encoder u_lv (.clk, .rst_n, .init, .tc(lv_tc), .t1, .level, .first, .next, .code(l_code));

  function automatic bit is(code_t c, string s);
    if (int'(c.len) != s.len()) return 0;
    for (int i = 0; i < s.len(); i++) if (c.bits[s.len() - 1 - i] != (s[i] == "1")) return 0;
    return 1;
  endfunction

  initial begin
    // spot codewords from the standard's tables
    ti = 0; ct_tc = 0; ct_t1 = 0; #1 check(is(ct_code, "1"), "coeff_token nC<2 0/0");
    ti = 0; ct_tc = 5; ct_t1 = 3; #1 check(is(ct_code, "0000100"), "coeff_token nC<2 5/3");
    ti = 1; ct_tc = 0; ct_t1 = 0; #1 check(is(ct_code, "11"), "coeff_token 2<=nC<4 0/0");
    ti = 2; ct_tc = 0; ct_t1 = 0; #1 check(is(ct_code, "1111"), "coeff_token 4<=nC<8 0/0");
    ti = 3; ct_tc = 0; ct_t1 = 0; #1 check(is(ct_code, "000011"), "coeff_token nC>=8 0/0");
    ti = 3; ct_tc = 1; ct_t1 = 1; #1 check(is(ct_code, "000001"), "coeff_token nC>=8 1/1");
    tz_tc = 1; tz_tz = 0; #1 check(is(tz_code, "1"), "total_zeros 1/0");
    tz_tc = 5; tz_tz = 3; #1 check(is(tz_code, "111"), "total_zeros 5/3");
    tz_tc = 15; tz_tz = 1; #1 check(is(tz_code, "1"), "total_zeros 15/1");
    rb_zl = 1; rb_run = 0; #1 check(is(rb_code, "1"), "run_before 1/0");
    rb_zl = 3; rb_run = 1; #1 check(is(rb_code, "10"), "run_before 3/1");
    rb_zl = 9; rb_run = 14; #1 check(is(rb_code, "00000000001"), "run_before >6/14");
    // full tables through the encoders
    for (int t = 0; t < 4; t++)
      for (int c = 0; c <= 16; c++)
        for (int o = 0; o <= 3 && o <= c; o++) begin
          ti = 2'(t); ct_tc = 5'(c); ct_t1 = 2'(o);
          #1 check(ct_code.bits == 32'(CT_VAL[t * 68 + c * 4 + o]) && int'(ct_code.len) == CT_VBW[t * 68 + c * 4 + o] && ct_code.len != 0, "coeff_token table");
        end
    for (int c = 1; c < 16; c++)
      for (int z = 0; z <= 16 - c; z++) begin
        tz_tc = 5'(c); tz_tz = 5'(z);
        #1 check(tz_code.bits == 32'(TZ_VAL[(c - 1) * 16 + z]) && tz_code.len != 0, "total_zeros table");
      end
    for (int zl = 1; zl <= 14; zl++)
      for (int r = 0; r <= zl && r < 15; r++) begin
        rb_zl = 5'(zl); rb_run = 4'(r);
        #1 check(rb_code.bits == 32'(RB_VAL[((zl > 7 ? 7 : zl) - 1) * 16 + r]) && rb_code.len != 0, "run_before table");
      end
    for (int v = 0; v < 8; v++)
      for (int i = 0; i < 3; i++) begin
        t1_neg = 3'(v); sidx = 2'(i);
        #1 check(s_code.len == 1 && s_code.bits[0] == v[i], "sign bit");
      end
    // level encoder against the level coding rules
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 400; b++) begin
      int tc, o, sl, n;
      tc = $urandom_range(1, 16); o = $urandom_range(0, tc < 3 ? tc - 1 : 3);
      if (o > 3) o = 3;
      n = tc - o;
      @(negedge clk);
      init = 1; lv_tc = 5'(tc); t1 = 2'(o);
      @(negedge clk);
      init = 0;
      sl = (tc > 10 && o < 3) ? 1 : 0;
      for (int i = 0; i < n; i++) begin
        int lv, mag, lc, pre, sl_len, suf;
        bit [31:0] eb;
        mag = (b % 3 == 0) ? $urandom_range(1, 3000) : $urandom_range(1, 20);
        if (i == 0 && o < 3 && mag == 1) mag = 2;
        lv = $urandom_range(1) ? mag : -mag;
        lc = lv > 0 ? 2 * lv - 2 : -2 * lv - 1;
        if (i == 0 && o < 3) lc -= 2;
        if (sl == 0) begin
          if (lc < 14) begin pre = lc; sl_len = 0; suf = 0; end
          else if (lc < 30) begin pre = 14; sl_len = 4; suf = lc - 14; end
          else begin pre = 15; sl_len = 12; suf = lc - 30; end
        end else if (lc < (15 << sl)) begin pre = lc >> sl; sl_len = sl; suf = lc & ((1 << sl) - 1); end
        else begin pre = 15; sl_len = 12; suf = lc - (15 << sl); end
        if (suf >= 4096) break;   // beyond the escape range
        level = coef_t'(lv); first = (i == 0);
        #1;
        eb = (32'd1 << sl_len) | 32'(suf);
        check(int'(l_code.len) == pre + 1 + sl_len && l_code.bits == eb,
              $sformatf("level %0d (suffixLength %0d): len %0d exp %0d", lv, sl, l_code.len, pre + 1 + sl_len));
        next = 1;
        @(negedge clk);
        next = 0;
        if (sl == 0) sl = 1;
        if (mag > (3 << (sl - 1)) && sl < 6) sl++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
