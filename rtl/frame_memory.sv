// frame_memory: one frame of samples (current, reference, compensated or
// compensation-error frame). Simple dual-port RAM: one write port and one
// read port with a registered output, so read data appears one clock after
// re/raddr. Addresses are raster order, addr = y*FRAME_W + x. The array is
// not reset; every location is written before it is read.
// The frame size defaults to QCIF (176x144), the sequence format the
// encoder was evaluated on; the one-clock read latency is this design's choice.
module frame_memory #(
  parameter int unsigned FRAME_W = 176,
  parameter int unsigned FRAME_H = 144,
  parameter int unsigned DW      = 8,
  localparam int unsigned DEPTH  = FRAME_W * FRAME_H,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
