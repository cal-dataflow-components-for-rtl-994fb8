// tb_mb_register: fills the MB register with random samples and reads all
// 256 back in random order.
module tb_mb_register;
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

  logic we = 0;
  logic [7:0] widx = '0, wdata = '0, ridx = '0, rdata;
  logic [7:0] model [256];

  mb_register dut (.*);

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; widx = 8'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 512; i++) begin
      ridx = 8'($urandom);
      #1;
      check(rdata == model[ridx], $sformatf("index %0d", ridx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
