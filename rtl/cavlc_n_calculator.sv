// cavlc_n_calculator: nC, the predicted number of nonzero coefficients,
// from the counts of the upper (nu) and left (nl) neighbouring blocks:
// both available -> (nu + nl + 1) >> 1, one available -> that count,
// none -> 0. avail = {upper, left}. Combinational. Bit 0 of the sum s is
// dropped by the halving, so it is left unread on purpose.
// The document gives the function (nC from the neighbours); the rounding
// rule is the standard's.
module cavlc_n_calculator (
  input  logic [4:0] nu,
  input  logic [4:0] nl,
  input  logic [1:0] avail,
  output logic [4:0] nc
);
  logic [5:0] s;
  assign s = 6'(nu) + 6'(nl) + 6'd1;
  always_comb begin
    unique case (avail)
      2'b11:   nc = s[5:1];
      2'b10:   nc = nu;
      2'b01:   nc = nl;
      default: nc = '0;
    endcase
  end
endmodule
