// tb_mb_mem_controller: starts the controller on several MB positions of a
// 64x48 frame, steps it continuously and with random gaps, and checks the
// 256 addresses (raster order inside the MB), idx, last and done.
module tb_mb_mem_controller;
  import me_pkg::*;
  localparam int W = 64, H = 48, AW = $clog2(W * H);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rst_n = 0, start = 0, step = 0, busy, last, done;
  pos_t pos = '0;
  logic [AW-1:0] addr;
  logic [7:0] idx;

  mb_mem_controller #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int px [4] = '{0, 16, 5, 48};
    int py [4] = '{0, 16, 9, 32};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      @(negedge clk);
      start = 1; pos.x = coord_t'(px[t]); pos.y = coord_t'(py[t]);
      @(negedge clk);
      start = 0;
      for (int i = 0; i < 256; i++) begin
        step = (t % 2 == 0) ? 1'b1 : 1'($urandom_range(1));
        while (!step) begin
          #1;
          check(busy && idx == 8'(i), "holds while not stepped");
          @(negedge clk);
          step = 1'($urandom_range(1));
        end
        #1;
        check(busy && addr == AW'((py[t] + i / 16) * W + px[t] + i % 16) && idx == 8'(i),
              $sformatf("pixel %0d addr %0d", i, addr));
        check(last == (i == 255), "last");
        @(negedge clk);
      end
      step = 0;
      #1;
      check(done && !busy, "done after the 256th pixel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
