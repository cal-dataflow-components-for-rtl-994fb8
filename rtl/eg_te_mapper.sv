// eg_te_mapper: truncated mapping. When the element's range is above one
// it is coded like ue (code_num = k); when the range is one the codeword is
// the single inverted bit !k (raw = 1, raw_bit). Combinational.
// The two cases (range one inverted bit, else unsigned) follow the
// document and the standard.
module eg_te_mapper
  import eg_pkg::*;
(
  input  logic [VW-1:0]  k,
  input  logic [VW-1:0]  range,
  output logic [CNW-1:0] code_num,
  output logic           raw,
  output logic           raw_bit
);
  assign raw      = (range <= VW'(1));
  assign raw_bit  = !k[0];
  assign code_num = CNW'(k);
endmodule
