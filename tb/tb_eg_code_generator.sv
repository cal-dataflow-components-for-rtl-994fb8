// tb_eg_code_generator: for code_num in 0..2^17-2, M = floor(log2(code_num
// + 1)) and INFO = code_num + 1 - 2^M.
module tb_eg_code_generator;
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

  logic [CNW-1:0] code_num, info;
  logic [4:0] m;

  eg_code_generator dut (.*);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int cn, em;
      cn = (i < 1000) ? i : int'($urandom_range((1 << CNW) - 2));
      if (i == 1000) cn = (1 << CNW) - 2;
      code_num = CNW'(cn);
      em = $clog2(cn + 2) - 1;
      #1;
      check(int'(m) == em && int'(info) == cn + 1 - (1 << em), $sformatf("code_num %0d: M %0d INFO %0d", cn, m, info));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
