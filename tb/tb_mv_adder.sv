// tb_mv_adder: reference position = MB position + motion vector for random
// positions and signed vectors.
module tb_mv_adder;
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

  pos_t pos, ref_pos;
  mv_t mv;

  mv_adder dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      int cx, cy, dx, dy;
      cx = $urandom_range(16, 200); cy = $urandom_range(16, 200);
      dx = $urandom_range(32) - 16; dy = $urandom_range(32) - 16;
      pos.x = coord_t'(cx); pos.y = coord_t'(cy);
      mv.x = mv_comp_t'(dx); mv.y = mv_comp_t'(dy);
      #1;
      check(int'(ref_pos.x) == cx + dx && int'(ref_pos.y) == cy + dy, "reference position");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
