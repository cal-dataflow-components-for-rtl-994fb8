// cavlc_splitter: splits the nonzero coefficients of the reversed block
// into the trailing ones (RT1s: up to three +/-1 values at the
// high-frequency end, reported by their sign bits t1_neg[0..2] and count
// n_t1) and the remaining coefficients (RTCs: levels[0..n_lev-1], highest
// frequency first). Combinational.
// The document names the splitter between trailing ones and levels; the
// output format is this design's choice.
module cavlc_splitter
  import cavlc_pkg::*;
(
  input  coefs_t     rs,
  output logic [2:0] t1_neg,
  output logic [1:0] n_t1,
  output coef_t      levels [16],
  output logic [4:0] n_lev
);
  always_comb begin
    logic t1_phase;
    t1_neg   = '0;
    n_t1     = '0;
    n_lev    = '0;
    t1_phase = 1'b1;
    for (int i = 0; i < 16; i++) levels[i] = '0;
    for (int j = 0; j < 16; j++) begin
      if (rs[j] != 0) begin
        if (t1_phase && (rs[j] == 1 || rs[j] == -1) && n_t1 != 2'd3) begin
          t1_neg[n_t1] = rs[j][CW-1];
          n_t1 = n_t1 + 1'b1;
        end else begin
          t1_phase = 1'b0;
          levels[n_lev[3:0]] = rs[j];
          n_lev = n_lev + 1'b1;
        end
      end
    end
  end
endmodule
