// tb_recon_adder: rec = clip(comp + err, 0, 255) over a grid of inputs.
module tb_recon_adder;
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

  logic [7:0] comp, rec;
  logic signed [8:0] err;

  recon_adder dut (.*);

  initial begin
    for (int c = 0; c < 256; c += 3)
      for (int e = -255; e < 256; e += 7) begin
        int s;
        comp = 8'(c); err = 9'(e);
        s = c + e; if (s < 0) s = 0; if (s > 255) s = 255;
        #1;
        check(int'(rec) == s, $sformatf("%0d + %0d -> %0d", c, e, rec));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
