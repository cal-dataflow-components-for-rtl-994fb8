// tb_address_mux: drives random ME/MC read requests and checks the address
// selected for the memory, and that line_sel and rd_valid follow one clock
// later.
module tb_address_mux;
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

  logic rst_n = 0, re1 = 0, re2 = 0, mem_re, line_sel, rd_valid;
  logic [AW-1:0] addr1 = '0, addr2 = '0, mem_addr;

  address_mux #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  initial begin
    logic exp_sel, exp_valid;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      re1 = 1'($urandom_range(1)); re2 = re1 ? 1'b0 : 1'($urandom_range(1));
      addr1 = AW'($urandom); addr2 = AW'($urandom);
      #1;
      check(mem_re == (re1 || re2), "mem_re");
      if (re1) check(mem_addr == addr1, "internal address");
      else if (re2) check(mem_addr == addr2, "external address");
      exp_sel = !re1 && re2; exp_valid = re1 || re2;
      @(negedge clk);
      check(line_sel == exp_sel && rd_valid == exp_valid, "line select one clock later");
      re1 = 0; re2 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
