// tb_incremental_control: walks the sequencer through start, MB-complete
// pulses in the write phase, the flip to read (CLR + to_read), read-phase
// increments and the end of the frame.
module tb_incremental_control;
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

  logic rst_n = 0, start = 0, rx_mb_done = 0, rd_mb_done = 0, scan_done = 0;
  logic clr, incr, to_read, to_write, read_phase, frame_done;

  incremental_control dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(!clr && !incr && !read_phase, "idle");
    start = 1;
    #1 check(clr, "start clears the scanner");
    @(negedge clk) start = 0;
    rd_mb_done = 1;
    #1 check(!incr, "read pulses ignored in write phase");
    rd_mb_done = 0; rx_mb_done = 1;
    #1 check(incr && !clr, "received MB -> INCR");
    @(negedge clk) rx_mb_done = 0; scan_done = 1;
    #1 check(clr && to_read && !frame_done, "end of write phase -> CLR, to_read");
    @(negedge clk) scan_done = 0;
    #1 check(read_phase, "read phase");
    rd_mb_done = 1;
    #1 check(incr, "read MB -> INCR");
    @(negedge clk) rd_mb_done = 0; scan_done = 1;
    #1 check(frame_done && to_write && !clr, "end of read phase");
    @(negedge clk) scan_done = 0;
    #1 check(!read_phase && !clr, "back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
