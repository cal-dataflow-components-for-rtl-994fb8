// eg_code_generator: builds the two fields of an Exp-Golomb codeword from
// a code number: M = floor(log2(code_num + 1)) and INFO = code_num + 1 - 2^M.
// The codeword is M zeros, a one, and INFO in M bits (2M + 1 bits in
// all); the prefix is described by M, the suffix by INFO (its binary form
// is the decimal-to-binary conversion). Combinational.
// The split of code_num + 1 into M and INFO is the document's; the
// leading-one detector is this design's way to find M.
module eg_code_generator
  import eg_pkg::*;
(
  input  logic [CNW-1:0] code_num,
  output logic [4:0]     m,
  output logic [CNW-1:0] info
);
  logic [CNW:0] v;
  always_comb begin
    v = {1'b0, code_num} + 1'b1;
    m = '0;
    for (int i = 0; i <= int'(CNW); i++) if (v[i]) m = 5'(i);
    info = CNW'(v - ((CNW+1)'(1) << m));
  end
endmodule
