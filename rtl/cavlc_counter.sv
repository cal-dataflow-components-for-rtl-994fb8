// cavlc_counter: block statistics of a zigzag-ordered block: TotalCoeffs
// (nonzero coefficients), TrailingOnes (consecutive +/-1 values at the
// high-frequency end of the nonzero sequence, at most 3) and total_zeros
// (zeros ahead of the last nonzero coefficient). Combinational.
// The three counts are the ones the document assigns to this actor; the
// combinational form is this design's choice.
module cavlc_counter
  import cavlc_pkg::*;
(
  input  coefs_t     zz,
  output logic [4:0] total_coeffs,
  output logic [1:0] trailing_ones,
  output logic [4:0] total_zeros
);
  always_comb begin
    logic stop;
    int   last;
    total_coeffs  = '0;
    trailing_ones = '0;
    last = -1;
    for (int i = 0; i < 16; i++) begin
      if (zz[i] != 0) begin
        total_coeffs = total_coeffs + 1'b1;
        last = i;
      end
    end
    total_zeros = (last < 0) ? 5'd0 : 5'(last + 1) - total_coeffs;
    stop = 1'b0;
    for (int i = 15; i >= 0; i--) begin
      if (zz[i] != 0 && !stop) begin
        if ((zz[i] == 1 || zz[i] == -1) && trailing_ones != 2'd3) trailing_ones = trailing_ones + 1'b1;
        else stop = 1'b1;
      end
    end
  end
endmodule
