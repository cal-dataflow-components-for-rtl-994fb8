// tb_intra_round_shift_clip: out = clip((val + round) >>> shift, 0, 255)
// for random signed values, all round/shift settings used by the
// controller and the clipping limits.
module tb_intra_round_shift_clip;
  import intra_pkg::*;
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

  opnd_t val;
  logic [4:0] round;
  logic [2:0] shift;
  logic [7:0] out;

  intra_round_shift_clip dut (.*);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int v, r, s, e;
      v = int'($urandom_range(20000)) - 10000;
      if (i % 3 == 0) v = int'($urandom_range(600)) - 100;
      r = $urandom_range(31); s = $urandom_range(7);
      val = opnd_t'(v); round = 5'(r); shift = 3'(s);
      e = (v + r) >>> s;
      e = e < 0 ? 0 : (e > 255 ? 255 : e);
      #1;
      check(int'(out) == e, $sformatf("(%0d + %0d) >>> %0d -> %0d exp %0d", v, r, s, out, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
