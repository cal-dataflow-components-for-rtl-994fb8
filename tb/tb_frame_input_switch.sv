// tb_frame_input_switch: loads a current and a reference frame of a small
// frame size through the switch, checking the steering of each byte, the
// sequential addresses, the loaded flags, in_ready back-pressure, explicit
// addressing and the clearing by frame_done.
module tb_frame_input_switch;
  localparam int W = 16, H = 16, DEPTH = W * H, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic rst_n = 0, in_valid = 0, flip = 0, addr_en = 0, frame_done = 0;
  logic [7:0] in_data = '0, mem_data;
  logic [AW-1:0] in_addr = '0, mem_addr;
  logic in_ready, cur_we, ref_we, cur_loaded, ref_loaded;

  frame_input_switch #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        in_valid = 1; flip = f[0]; in_data = 8'(i * 3 + f);
        #1;
        check(in_ready, "ready while loading");
        check(cur_we == (f == 0) && ref_we == (f == 1), "steering");
        check(mem_addr == AW'(i) && mem_data == 8'(i * 3 + f), "address/data");
      end
      @(negedge clk);
      in_valid = 0;
      #1;
      check(f == 0 ? (cur_loaded && !ref_loaded) : (cur_loaded && ref_loaded), "loaded flags");
    end
    // loaded memory refuses more bytes
    in_valid = 1; flip = 0;
    #1;
    check(!in_ready && !cur_we, "no write to a loaded memory");
    @(negedge clk);
    in_valid = 0; frame_done = 1;
    @(negedge clk);
    frame_done = 0;
    #1;
    check(!cur_loaded && !ref_loaded, "frame_done clears flags");
    // explicit address into the reference memory
    in_valid = 1; flip = 1; addr_en = 1; in_addr = AW'(77); in_data = 8'hA5;
    #1;
    check(ref_we && mem_addr == AW'(77) && mem_data == 8'hA5, "explicit address");
    @(negedge clk);
    in_valid = 0; addr_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
