// mb_register: holds the 256 samples of one macroblock so that the current
// MB, which every candidate comparison uses, is read from the frame memory
// only once. Written one sample per clock at widx; read combinationally at
// ridx (index = 16*row + column). Used twice: as the current MB register
// feeding the SAD, and as current MB register 2, which keeps the MB for
// the motion compensator's subtractor once the best match is known.
// The role is the document's; the random-access read port is this design's.
module mb_register (
  input  logic       clk,
  input  logic       we,
  input  logic [7:0] widx,
  input  logic [7:0] wdata,
  input  logic [7:0] ridx,
  output logic [7:0] rdata
);
  logic [7:0] mem [256];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
  end

  assign rdata = mem[ridx];
endmodule
