// tb_mv_calculator: motion vector = best position - current position for
// random positions within +/-16 of each other.
module tb_mv_calculator;
  import me_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pos_t cur_pos, best_pos;
  mv_t mv;

  mv_calculator dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      int cx, cy, dx, dy;
      cx = $urandom_range(16, 200); cy = $urandom_range(16, 200);
      dx = $urandom_range(32) - 16; dy = $urandom_range(32) - 16;
      cur_pos.x = coord_t'(cx); cur_pos.y = coord_t'(cy);
      best_pos.x = coord_t'(cx + dx); best_pos.y = coord_t'(cy + dy);
      #1;
      check(int'(mv.x) == dx && int'(mv.y) == dy, $sformatf("mv (%0d,%0d) exp (%0d,%0d)", mv.x, mv.y, dx, dy));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
