// tb_exp_golomb: a random mix of ue/se/te/me elements (te with range 1 and
// larger, values up to 16 bits) offered with random gaps; the serial output
// is compared bit for bit with codewords built here from the H.264
// definitions, and bit_last must mark each codeword's final bit.
// Coverage: each element type, the single-bit te form, long codewords.
module tb_exp_golomb;
  import eg_pkg::*;
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

  localparam int INTRA_CBP [48] = '{47, 31, 15, 0, 23, 27, 29, 30, 7, 11, 13, 14, 39, 43, 45, 46,
    16, 3, 5, 10, 12, 19, 21, 26, 28, 35, 37, 42, 44, 1, 2, 4, 8, 17, 18, 20, 24, 6, 9, 22, 25,
    32, 33, 34, 36, 40, 38, 41};
  localparam int INTER_CBP [48] = '{0, 16, 1, 2, 4, 8, 32, 3, 5, 10, 12, 15, 47, 7, 11, 13, 14,
    6, 9, 31, 35, 37, 42, 44, 33, 34, 36, 40, 39, 43, 45, 46, 17, 18, 20, 24, 19, 21, 26, 28,
    23, 27, 29, 30, 22, 25, 38, 41};

  logic rst_n = 0, in_valid = 0, in_ready, bit_valid, bit_out, bit_last;
  eg_type_t etype = EG_UE;
  logic [VW-1:0] value = '0, range = '0;
  pmode_t pmode = PM_INTRA;
  logic [1:0] cat = 2'd1;

  exp_golomb dut (.*);

  bit exp_bits [$];
  bit exp_last [$];
  int n_type [4], n_raw = 0, n_long = 0, n_bits = 0;

  function automatic void push_ue(int cn);
    int m;
    m = $clog2(cn + 2) - 1;
    for (int i = 0; i < m; i++) begin exp_bits.push_back(0); exp_last.push_back(0); end
    for (int i = m; i >= 0; i--) begin
      exp_bits.push_back(1'((cn + 1) >> i)); exp_last.push_back(i == 0);
    end
    if (2 * m + 1 > 25) n_long++;
  endfunction

  always @(posedge clk) begin
    if (rst_n && bit_valid) begin
      n_bits++;
      if (exp_bits.size() == 0) check(0, "unexpected bit");
      else begin
        bit b, l;
        b = exp_bits.pop_front(); l = exp_last.pop_front();
        check(bit_out == b && bit_last == l, $sformatf("bit %0d: got %0d/%0d exp %0d/%0d", n_bits, bit_out, bit_last, b, l));
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      int t, v, r, p, cn;
      @(negedge clk);
      in_valid = 0;
      while ($urandom_range(2) == 0) @(negedge clk);
      t = $urandom_range(3);
      case (t)
        0: begin
          v = (i % 5 == 0) ? int'($urandom_range(65535)) : int'($urandom_range(40));
          cn = v;
        end
        1: begin
          v = (i % 5 == 0) ? int'($urandom_range(65535)) - 32768 : int'($urandom_range(40)) - 20;
          cn = v > 0 ? 2 * v - 1 : -2 * v;
        end
        2: begin
          r = $urandom_range(1, 4);
          v = $urandom_range(r);
          cn = v;
        end
        default: begin
          p = $urandom_range(1);
          cn = $urandom_range(47);
          v = p ? INTER_CBP[cn] : INTRA_CBP[cn];
        end
      endcase
      etype = eg_type_t'(t); value = VW'(v); range = VW'(r); pmode = pmode_t'(p);
      cat = 2'($urandom_range(1, 2));
      in_valid = 1;
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      n_type[t]++;
      if (t == 2 && r == 1) begin
        exp_bits.push_back(!v[0]); exp_last.push_back(1); n_raw++;
      end else push_ue(cn);
    end
    @(negedge clk) in_valid = 0;
    repeat (100) @(negedge clk);
    check(exp_bits.size() == 0, "all expected bits sent");
    for (int t = 0; t < 4; t++) check(n_type[t] > 0, $sformatf("type %0d used", t));
    check(n_raw > 0 && n_long > 0, "single-bit te and long codewords used");
    $display("coverage: ue=%0d se=%0d te=%0d me=%0d te_raw=%0d long=%0d bits=%0d", n_type[0], n_type[1], n_type[2], n_type[3], n_raw, n_long, n_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
