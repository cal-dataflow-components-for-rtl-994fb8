// tb_sad_unit: feeds random 256-pair candidates, with idle gaps, and checks
// each score against a sum of absolute differences computed here, plus the
// tag passed with the last pair.
module tb_sad_unit;
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

  logic rst_n = 0, in_valid = 0, last = 0, score_valid;
  logic [7:0] a = '0, b = '0;
  logic [19:0] tag_in = '0, tag_out;
  logic [15:0] score;

  sad_unit dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20; c++) begin
      int exp;
      exp = 0;
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        if ($urandom_range(3) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1; a = 8'($urandom); b = (c == 0) ? a : 8'($urandom);
        if (c == 1) begin a = 8'd255; b = 8'd0; end
        exp += (a > b) ? a - b : b - a;
        last = (i == 255); tag_in = 20'(c * 1000 + 7);
      end
      @(negedge clk);
      in_valid = 0; last = 0;
      check(score_valid && score == 16'(exp) && tag_out == 20'(c * 1000 + 7),
            $sformatf("candidate %0d score %0d exp %0d", c, score, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
