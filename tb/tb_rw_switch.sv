// tb_rw_switch: checks that writes pass only in write mode and reads only
// in read mode, and the flips by to_read / to_write.
module tb_rw_switch;
  localparam int W = 32, H = 32, AW = $clog2(W * H);
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

  logic rst_n = 0, to_read = 0, to_write = 0, wr = 0, rd = 0;
  logic mem_we, mem_re, read_mode;
  logic [AW-1:0] addr = '0, mem_waddr, mem_raddr;

  rw_switch #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 4; ph++) begin
      for (int i = 0; i < 20; i++) begin
        wr = 1'($urandom_range(1)); rd = 1'($urandom_range(1)); addr = AW'($urandom);
        #1;
        check(read_mode == ph[0], "mode");
        check(mem_we == (wr && !ph[0]) && mem_re == (rd && ph[0]), "gating");
        check(mem_waddr == addr && mem_raddr == addr, "address");
        @(negedge clk);
      end
      if (ph[0]) to_write = 1; else to_read = 1;
      @(negedge clk);
      to_write = 0; to_read = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
