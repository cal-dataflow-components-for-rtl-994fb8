// address_mux: shares the reference frame memory's read port between the
// ME's reference memory controller (Address 1 / Read Enable 1) and the
// motion compensator (Address 2 / Read Enable 2). The selected address and
// enable go to the memory combinationally; line_sel (0 = SAD, 1 = MC) and
// rd_valid are registered so they arrive with the memory's read data one
// clock later, which is what the data switch needs. Read Enable 1 wins if
// both are high (in this design they never are).
// Ports follow the document's figure; the priority and the one-clock
// alignment are this design's choice.
module address_mux #(
  parameter int unsigned FRAME_W = 176,
  parameter int unsigned FRAME_H = 144,
  localparam int unsigned AW     = $clog2(FRAME_W * FRAME_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          re1,
  input  logic [AW-1:0] addr1,
  input  logic          re2,
  input  logic [AW-1:0] addr2,
  output logic          mem_re,
  output logic [AW-1:0] mem_addr,
  output logic          line_sel,
  output logic          rd_valid
);
  assign mem_re   = re1 || re2;
  assign mem_addr = re1 ? addr1 : addr2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      line_sel <= 1'b0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= mem_re;
      line_sel <= !re1 && re2;
    end
  end
endmodule
