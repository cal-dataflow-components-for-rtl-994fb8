// eg_se_mapper: signed mapping of a two's complement value k to a code
// number: k > 0 -> 2k - 1, k <= 0 -> -2k (so 0, 1, -1, 2, -2 ... map to
// 0, 1, 2, 3, 4 ...). Combinational. This is the H.264 se(v) rule.
// The document describes this mapper but states the signs the other way
// round; the standard's mapping is used so that the output decodes.
module eg_se_mapper
  import eg_pkg::*;
(
  input  logic signed [VW-1:0] k,
  output logic [CNW-1:0]       code_num
);
  logic [CNW-1:0] mag;
  assign mag      = k[VW-1] ? CNW'(-$signed({k[VW-1], k})) : CNW'(k);
  assign code_num = (k > 0) ? (CNW'(2) * mag - CNW'(1)) : (CNW'(2) * mag);
endmodule
