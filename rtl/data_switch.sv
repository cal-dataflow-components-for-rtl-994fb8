// data_switch: routes each reference-memory read to the SAD (line 1) or to
// the motion compensator (line 2) as chosen by line_sel (0 = line 1,
// 1 = line 2). Purely combinational; the data is shown on both lines and
// only the valid of the selected line is raised.
// Follows the document's Data Switch; the encoding of line_sel is this
// design's choice.
module data_switch (
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       line_sel,
  output logic       line1_valid,
  output logic [7:0] line1_data,
  output logic       line2_valid,
  output logic [7:0] line2_data
);
  assign line1_valid = in_valid && !line_sel;
  assign line2_valid = in_valid &&  line_sel;
  assign line1_data  = in_data;
  assign line2_data  = in_data;
endmodule
