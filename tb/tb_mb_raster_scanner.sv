// tb_mb_raster_scanner: clears the scanner and advances it through a
// 64x48 frame (4x3 MBs), checking each position, the one-clock pos_valid
// timing and done after the last MB, then clears it again mid-frame.
module tb_mb_raster_scanner;
  import me_pkg::*;
  localparam int W = 64, H = 48;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rst_n = 0, clr = 0, incr = 0, pos_valid, done;
  pos_t pos;

  mb_raster_scanner #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    check(pos_valid && pos.x == 0 && pos.y == 0 && !done, "first MB after clr");
    for (int my = 0; my < H / 16; my++)
      for (int mx = 0; mx < W / 16; mx++) begin
        if (mx == 0 && my == 0) continue;
        @(negedge clk) incr = 1;
        @(negedge clk) incr = 0;
        check(pos_valid && pos.x == coord_t'(mx * 16) && pos.y == coord_t'(my * 16),
              $sformatf("MB (%0d,%0d) got (%0d,%0d)", mx, my, pos.x, pos.y));
        @(negedge clk);
        check(!pos_valid, "pos_valid is a pulse");
      end
    @(negedge clk) incr = 1;
    @(negedge clk) incr = 0;
    check(done && !pos_valid, "done after last MB");
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    check(!done && pos_valid && pos.x == 0, "clr restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
