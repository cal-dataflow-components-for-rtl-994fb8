// tb_intra_pe: random iterations into one processing element: the two
// adder levels, the D register (loaded unless bypass, fed back on din),
// accumulate iterations (no output), bypass iterations and the round /
// shift / clip stage; checked against a cycle model.
module tb_intra_pe;
  import intra_pkg::*;
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

  logic rst_n = 0, en = 0, pred_valid;
  pe_ctl_t ctl = '0;
  opnd_t din;
  logic [7:0] pred;
  int n_acc = 0, n_byp = 0, n_out = 0;

  intra_pe dut (.*);

  initial begin
    int d, e, pv, pe, r, s, b, bv;
    d = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(4) != 0);
      ctl.op0 = opnd_t'(int'($urandom_range(1000)) - 200);
      ctl.op1 = opnd_t'($urandom_range(255));
      ctl.op2 = opnd_t'($urandom_range(510));
      ctl.op3 = opnd_t'(int'($urandom_range(255)) - 128);
      ctl.acc = 1'($urandom_range(3) == 0);
      ctl.byp = 1'($urandom_range(5) == 0);
      ctl.round = 5'($urandom_range(31)); ctl.shift = 3'($urandom_range(5));
      ctl.bval = 8'($urandom);
      @(posedge clk);
      #1;
      if (en) begin
        if (!ctl.byp) d = int'(ctl.op0) + int'(ctl.op1) + int'(ctl.op2) + int'(ctl.op3);
        pv = ctl.byp || !ctl.acc;
        if (ctl.byp) e = ctl.bval;
        else begin
          e = (d + int'(ctl.round)) >>> ctl.shift;
          e = e < 0 ? 0 : (e > 255 ? 255 : e);
        end
        if (ctl.acc && !ctl.byp) n_acc++;
        if (ctl.byp) n_byp++;
        check(pred_valid == 1'(pv), "pred_valid");
        if (pv) begin
          check(int'(pred) == e, $sformatf("pred %0d exp %0d", pred, e));
          n_out++;
        end
      end else check(!pred_valid, "no output without en");
      check(int'(din) == d, "D register on din");
    end
    check(n_acc > 0 && n_byp > 0 && n_out > 0, "accumulate, bypass and output iterations all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
