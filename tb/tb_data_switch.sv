// tb_data_switch: checks that reads reach line 1 (SAD) or line 2 (MC) only
// as line_sel says.
module tb_data_switch;
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

  logic in_valid, line_sel, line1_valid, line2_valid;
  logic [7:0] in_data, line1_data, line2_data;

  data_switch dut (.*);

  initial begin
    for (int i = 0; i < 200; i++) begin
      in_valid = 1'($urandom_range(1)); line_sel = 1'($urandom_range(1)); in_data = 8'($urandom);
      #1;
      check(line1_valid == (in_valid && !line_sel) && line2_valid == (in_valid && line_sel), "valid routing");
      check((!line1_valid || line1_data == in_data) && (!line2_valid || line2_data == in_data), "data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
