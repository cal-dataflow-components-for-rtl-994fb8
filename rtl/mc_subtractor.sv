// mc_subtractor: compensation error of one pixel, err = current - compensated,
// as a 9-bit two's complement value (-255..255). Combinational.
// The subtraction is the document's; the operand order (so that the
// reconstruction adds the error back) is this design's choice.
module mc_subtractor (
  input  logic [7:0]        cur,
  input  logic [7:0]        comp,
  output logic signed [8:0] err
);
  assign err = $signed({1'b0, cur}) - $signed({1'b0, comp});
endmodule
