// tb_mc_subtractor: exhaustive check of err = current - compensated.
module tb_mc_subtractor;
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

  logic [7:0] cur, comp;
  logic signed [8:0] err;

  mc_subtractor dut (.*);

  initial begin
    for (int c = 0; c < 256; c += 3)
      for (int p = 0; p < 256; p += 5) begin
        cur = 8'(c); comp = 8'(p);
        #1;
        check(int'(err) == c - p, "difference");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
