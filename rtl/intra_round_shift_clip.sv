// intra_round_shift_clip: the Round Shift Clip stage of a processing
// element: out = clip((val + round) >>> shift, 0, 255), arithmetic shift
// of a signed value. Combinational.
// Round, shift and clip as a stage after the D register is the
// document's; the arithmetic (not logical) shift is this design's choice,
// needed for negative plane-mode sums.
module intra_round_shift_clip
  import intra_pkg::*;
(
  input  opnd_t      val,
  input  logic [4:0] round,
  input  logic [2:0] shift,
  output logic [7:0] out
);
  logic signed [OW:0] r;
  always_comb begin
    r = ($signed({val[OW-1], val}) + $signed({{(OW-4){1'b0}}, round})) >>> shift;
    if (r < 0)              out = 8'd0;
    else if (r > 255)       out = 8'd255;
    else                    out = r[7:0];
  end
endmodule
