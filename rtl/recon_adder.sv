// recon_adder: rebuilds a pixel of the decoded frame from the compensated
// pixel and the reconstructed (quantised, rescaled, inverse-transformed)
// compensation error: rec = clip(comp + err, 0, 255). Combinational.
// The addition is the document's; the clipping is this design's choice.
module recon_adder (
  input  logic [7:0]        comp,
  input  logic signed [8:0] err,
  output logic [7:0]        rec
);
  logic signed [10:0] sum;
  assign sum = $signed({3'b000, comp}) + 11'(err);
  assign rec = (sum < 0) ? 8'd0 : (sum > 11'sd255) ? 8'd255 : sum[7:0];
endmodule
