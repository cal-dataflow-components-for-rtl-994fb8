// tb_sad_comparator: sends n random scores (with repeats) per round and
// checks the minimum, the position of its first occurrence, and that
// best_valid pulses exactly after the n-th score.
module tb_sad_comparator;
  import me_pkg::*;
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

  logic rst_n = 0, start = 0, score_valid = 0, best_valid;
  logic [15:0] n_comp = '0, score = '0, min_score;
  pos_t cand = '0, best_pos;

  sad_comparator dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 30; r++) begin
      int n, best, bi;
      n = $urandom_range(1, 40);
      best = 1 << 20; bi = -1;
      @(negedge clk);
      start = 1; n_comp = 16'(n);
      @(negedge clk);
      start = 0;
      for (int i = 0; i < n; i++) begin
        score_valid = 1; score = 16'($urandom_range(50));
        cand.x = coord_t'(i); cand.y = coord_t'(r);
        if (int'(score) < best) begin best = score; bi = i; end
        @(negedge clk);
        score_valid = 0;
        if (i != n - 1) check(!best_valid, "no early result");
      end
      check(best_valid && min_score == 16'(best) && best_pos.x == coord_t'(bi) && best_pos.y == coord_t'(r),
            $sformatf("round %0d min %0d exp %0d at %0d exp %0d", r, min_score, best, best_pos.x, bi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
