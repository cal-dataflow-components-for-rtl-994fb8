// rw_switch: puts one frame memory either in write mode or in read mode and
// routes the shared MB address to its write or its read port accordingly.
// Write mode after reset and after 'to_write'; 'to_read' (issued with the
// CLR that starts the read-out) switches to read. wr/rd strobes are gated
// combinationally by the mode.
// The CLR-driven flip is the document's; the return to write mode is this
// design's choice.
module rw_switch #(
  parameter int unsigned FRAME_W = 176,
  parameter int unsigned FRAME_H = 144,
  localparam int unsigned AW     = $clog2(FRAME_W * FRAME_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          to_read,
  input  logic          to_write,
  input  logic [AW-1:0] addr,
  input  logic          wr,
  input  logic          rd,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  output logic          read_mode
);
  always_ff @(posedge clk) begin
    if (!rst_n || to_write) read_mode <= 1'b0;
    else if (to_read)       read_mode <= 1'b1;
  end

  assign mem_we    = wr && !read_mode;
  assign mem_re    = rd &&  read_mode;
  assign mem_waddr = addr;
  assign mem_raddr = addr;
endmodule
