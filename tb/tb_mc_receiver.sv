// tb_mc_receiver: sends three MBs of pixels with random gaps and checks
// the relayed pixel, its index and the MB-complete pulse.
module tb_mc_receiver;
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

  logic rst_n = 0, in_valid = 0, out_valid, mb_done;
  logic [7:0] in_data = '0, out_data, idx;
  int dones = 0;

  mc_receiver dut (.*);

  int n_in = 0;
  always @(posedge clk) if (rst_n && in_valid) n_in++;
  always @(negedge clk) if (mb_done) begin
    dones++;
    check(n_in == 256 * dones, $sformatf("mb_done after %0d pixels", n_in));
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        in_valid = 0;
        while ($urandom_range(2) == 0) @(negedge clk);
        in_valid = 1; in_data = 8'($urandom);
        #1;
        check(out_valid && out_data == in_data && idx == 8'(i), "relay and index");
        if (i == 128) check(dones == m, "mb_done count");
      end
    @(negedge clk) in_valid = 0;
    @(negedge clk);
    check(dones == 3, "three MBs complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
