// frame_input_switch: takes the raw video byte stream and stores each byte
// in the frame memory its frame belongs to. 'flip' selects the target:
// 0 = current frame memory, 1 = reference frame memory. Without addr_en the
// write address is a per-memory counter (raster order); with addr_en the
// byte goes to in_addr, which the reconstruction path uses to write the
// reconstructed frame back as the next reference. A memory counts as loaded
// after FRAME_W*FRAME_H writes; in_ready drops for a loaded target until
// frame_done clears both flags. Outputs are combinational from the inputs
// (write strobes land in the memory at the same clock edge).
// The steering role follows the document; the flag and address handling
// are this design's own.
module frame_input_switch #(
  parameter int unsigned FRAME_W = 176,
  parameter int unsigned FRAME_H = 144,
  localparam int unsigned DEPTH  = FRAME_W * FRAME_H,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [7:0]    in_data,
  input  logic          flip,
  input  logic          addr_en,
  input  logic [AW-1:0] in_addr,
  input  logic          frame_done,
  output logic          cur_we,
  output logic          ref_we,
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_data,
  output logic          cur_loaded,
  output logic          ref_loaded
);
  logic [AW:0] cur_cnt, ref_cnt;

  assign cur_loaded = (cur_cnt == (AW+1)'(DEPTH));
  assign ref_loaded = (ref_cnt == (AW+1)'(DEPTH));
  assign in_ready   = flip ? !ref_loaded : !cur_loaded;

  always_comb begin
    cur_we   = in_valid && in_ready && !flip;
    ref_we   = in_valid && in_ready &&  flip;
    mem_data = in_data;
    if (addr_en) mem_addr = in_addr;
    else         mem_addr = flip ? ref_cnt[AW-1:0] : cur_cnt[AW-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || frame_done) begin
      cur_cnt <= '0;
      ref_cnt <= '0;
    end else begin
      if (cur_we) cur_cnt <= cur_cnt + 1'b1;
      if (ref_we) ref_cnt <= ref_cnt + 1'b1;
    end
  end
endmodule
