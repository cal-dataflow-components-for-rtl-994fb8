// tb_eg_mappers: the se and te mappers and the ME_MAPPING ROM (addressed
// by coded_block_pattern and prediction mode, as the coder wires it)
// against the H.264 definitions; the me check uses the standard's
// code_num -> coded_block_pattern listing written out here and checks the
// ROM inverts it for both prediction modes.
module tb_eg_mappers;
  import eg_pkg::*;
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

  localparam int INTRA_CBP [48] = '{47, 31, 15, 0, 23, 27, 29, 30, 7, 11, 13, 14, 39, 43, 45, 46,
    16, 3, 5, 10, 12, 19, 21, 26, 28, 35, 37, 42, 44, 1, 2, 4, 8, 17, 18, 20, 24, 6, 9, 22, 25,
    32, 33, 34, 36, 40, 38, 41};
  localparam int INTER_CBP [48] = '{0, 16, 1, 2, 4, 8, 32, 3, 5, 10, 12, 15, 47, 7, 11, 13, 14,
    6, 9, 31, 35, 37, 42, 44, 33, 34, 36, 40, 39, 43, 45, 46, 17, 18, 20, 24, 19, 21, 26, 28,
    23, 27, 29, 30, 22, 25, 38, 41};

  logic [VW-1:0] tk, trange;
  logic signed [VW-1:0] sk;
  logic [CNW-1:0] se_cn, te_cn;
  logic te_raw, te_raw_bit;
  logic [5:0] cbp, rom_cn;
  pmode_t pmode;

  eg_se_mapper u_se (.k(sk), .code_num(se_cn));
  eg_te_mapper u_te (.k(tk), .range(trange), .code_num(te_cn), .raw(te_raw), .raw_bit(te_raw_bit));
  eg_me_rom u_rom (.pmode, .addr(cbp), .code_num(rom_cn));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int s;
      s = (i < 300) ? i - 150 : int'($urandom_range(65535)) - 32768;
      sk = VW'(s);
      #1;
      check(int'(se_cn) == (s > 0 ? 2 * s - 1 : -2 * s), $sformatf("se %0d -> %0d", s, se_cn));
    end
    for (int r = 1; r < 6; r++)
      for (int k = 0; k <= r; k++) begin
        tk = VW'(k); trange = VW'(r);
        #1;
        if (r == 1) check(te_raw && te_raw_bit == !k[0], "te range 1 -> single inverted bit");
        else check(!te_raw && int'(te_cn) == k, "te range > 1 -> ue");
      end
    for (int p = 0; p < 2; p++)
      for (int c = 0; c < 48; c++) begin
        pmode = pmode_t'(p);
        cbp = 6'(p ? INTER_CBP[c] : INTRA_CBP[c]);
        #1;
        check(int'(rom_cn) == c, $sformatf("me %s cbp %0d -> %0d exp %0d", p ? "inter" : "intra", cbp, rom_cn, c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
