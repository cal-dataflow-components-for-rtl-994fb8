// tb_frame_memory: writes random data to random addresses of a small frame
// memory, keeps a copy, and reads back every written location checking the
// one-clock read latency.
module tb_frame_memory;
  localparam int W = 32, H = 16, DEPTH = W * H, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [8:0] wdata = '0, rdata;
  logic [8:0] model [DEPTH];

  frame_memory #(.FRAME_W(W), .FRAME_H(H), .DW(9)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = 9'($urandom); model[i] = wdata;
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'($urandom_range(DEPTH - 1)); wdata = 9'($urandom); model[waddr] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      re = 1; raddr = AW'(i);
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL addr %0d: %h != %h", i, rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
