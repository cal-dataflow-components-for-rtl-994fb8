// eg_mapping_controller: takes a syntax element (value + type) on an
// in_valid/in_ready handshake, hands its parameters to the mapper of that
// type (ue, se, te with its range, me with prediction mode and chroma array
// type) and forwards the mapper's code number to the code generator on a
// cn_valid/cn_ready handshake (one-entry output register). A te element of
// range one is passed on as a single raw bit instead of a code number.
// The controller choosing among four mappers is the document's; its
// registers and handshake are this design's choice.
module eg_mapping_controller
  import eg_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  eg_type_t       etype,
  input  logic [VW-1:0]  value,
  input  logic [VW-1:0]  range,
  input  pmode_t         pmode,
  input  logic [1:0]     cat,
  // parameters to the mappers
  output logic [VW-1:0]  map_k,
  output logic [VW-1:0]  map_range,
  output logic [5:0]     map_cbp,
  output pmode_t         map_pmode,
  output logic [1:0]     map_cat,
  // code numbers back from the mappers
  input  logic [CNW-1:0] ue_cn,
  input  logic [CNW-1:0] se_cn,
  input  logic [CNW-1:0] te_cn,
  input  logic           te_raw,
  input  logic           te_raw_bit,
  input  logic [CNW-1:0] me_cn,
  // to the code generator
  output logic           cn_valid,
  input  logic           cn_ready,
  output logic [CNW-1:0] code_num,
  output logic           raw,
  output logic           raw_bit
);
  assign map_k     = value;
  assign map_range = range;
  assign map_cbp   = value[5:0];
  assign map_pmode = pmode;
  assign map_cat   = cat;

  assign in_ready = !cn_valid || cn_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cn_valid <= 1'b0;
      code_num <= '0;
      raw      <= 1'b0;
      raw_bit  <= 1'b0;
    end else if (in_ready) begin
      cn_valid <= in_valid;
      if (in_valid) begin
        raw     <= 1'b0;
        raw_bit <= 1'b0;
        unique case (etype)
          EG_UE: code_num <= ue_cn;
          EG_SE: code_num <= se_cn;
          EG_TE: begin
            code_num <= te_cn;
            raw      <= te_raw;
            raw_bit  <= te_raw_bit;
          end
          default: code_num <= me_cn;
        endcase
      end
    end
  end
endmodule
