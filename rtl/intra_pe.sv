// intra_pe: one reconfigurable processing element of the intra predictor.
// Two first-level adders (op0+op1, op2+op3) and a second-level adder feed
// the D register; the D register's value goes back to the controller (din)
// and on through Round Shift Clip to the bypass multiplexer, which outputs
// either the rounded/shifted/clipped sum or the bypass value.
// Timing: on a clock with en high the controls are registered (the D
// register takes the sum unless the iteration is a bypass one, which leaves
// D untouched so partial sums survive); pred/pred_valid are valid in the
// following clock. pred_valid is low for accumulate-only iterations
// (ctl.acc). The adder/D-register/RSC/bypass structure is the document's;
// the operand width (OW, wider than the document's 8/9-bit adders so that
// accumulated sums fit) is this design's.
module intra_pe
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  pe_ctl_t    ctl,
  output opnd_t      din,
  output logic [7:0] pred,
  output logic       pred_valid
);
  opnd_t      s01, s23, sum, d_reg;
  logic [4:0] round_q;
  logic [2:0] shift_q;
  logic       byp_q;
  logic [7:0] bval_q, rsc;

  assign s01 = ctl.op0 + ctl.op1;   // first-level adder
  assign s23 = ctl.op2 + ctl.op3;   // first-level adder
  assign sum = s01 + s23;           // second-level adder

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_reg      <= '0;
      round_q    <= '0;
      shift_q    <= '0;
      byp_q      <= 1'b0;
      bval_q     <= '0;
      pred_valid <= 1'b0;
    end else begin
      pred_valid <= en && (ctl.byp || !ctl.acc);
      if (en) begin
        if (!ctl.byp) d_reg <= sum;
        round_q <= ctl.round;
        shift_q <= ctl.shift;
        byp_q   <= ctl.byp;
        bval_q  <= ctl.bval;
      end
    end
  end

  assign din = d_reg;

  intra_round_shift_clip u_rsc (.val(d_reg), .round(round_q), .shift(shift_q), .out(rsc));

  assign pred = byp_q ? bval_q : rsc;   // bypass multiplexer
endmodule
