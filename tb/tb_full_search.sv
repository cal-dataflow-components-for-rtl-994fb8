// tb_full_search: for MBs in the corners, edges and middle of a 64x48
// frame with search range 4, collects the candidates the module offers
// (with random ready gaps) and compares them with an independently computed
// clipped window in raster order, and checks n_comp and done.
module tb_full_search;
  import me_pkg::*;
  localparam int W = 64, H = 48, R = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rst_n = 0, start = 0, cand_valid, cand_ready = 0, n_valid, done;
  pos_t pos = '0, cand;
  logic [15:0] n_comp;

  full_search #(.FRAME_W(W), .FRAME_H(H), .SEARCH_RANGE(R)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mxs [5] = '{0, 48, 16, 32, 0};
    int mys [5] = '{0, 32, 16, 0, 32};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      int x0, x1, y0, y1, n, got;
      x0 = (mxs[t] - R < 0) ? 0 : mxs[t] - R;
      y0 = (mys[t] - R < 0) ? 0 : mys[t] - R;
      x1 = (mxs[t] + R > W - 16) ? W - 16 : mxs[t] + R;
      y1 = (mys[t] + R > H - 16) ? H - 16 : mys[t] + R;
      n = (x1 - x0 + 1) * (y1 - y0 + 1);
      @(negedge clk);
      start = 1; pos.x = coord_t'(mxs[t]); pos.y = coord_t'(mys[t]);
      @(negedge clk);
      start = 0;
      check(n_valid && n_comp == 16'(n), $sformatf("n_comp %0d exp %0d", n_comp, n));
      got = 0;
      for (int y = y0; y <= y1; y++)
        for (int x = x0; x <= x1; x++) begin
          cand_ready = 1'($urandom_range(1));
          while (!cand_ready) begin @(negedge clk); cand_ready = 1'($urandom_range(1)); end
          #1;
          check(cand_valid && cand.x == coord_t'(x) && cand.y == coord_t'(y),
                $sformatf("cand (%0d,%0d) exp (%0d,%0d)", cand.x, cand.y, x, y));
          got++;
          @(negedge clk);
        end
      cand_ready = 0;
      #1;
      check(done && !cand_valid && got == n, "done after last candidate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
