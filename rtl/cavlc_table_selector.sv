// cavlc_table_selector: picks the coeff_token VLC table from nC:
// 0 <= nC < 2 -> 0, 2 <= nC < 4 -> 1, 4 <= nC < 8 -> 2, 8 <= nC -> 3
// (the fixed-length table). Combinational.
// The document names the selector; the nC thresholds are the standard's.
module cavlc_table_selector (
  input  logic [4:0] nc,
  output logic [1:0] ti
);
  assign ti = (nc < 5'd2) ? 2'd0 : (nc < 5'd4) ? 2'd1 : (nc < 5'd8) ? 2'd2 : 2'd3;
endmodule
