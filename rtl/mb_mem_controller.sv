// mb_mem_controller: turns an MB position into the 256 frame-memory
// addresses of that macroblock, raster order inside the MB. A start pulse
// latches pos; from the next clock 'busy' is high and addr/idx show the
// current pixel (idx = 16*row + column inside the MB). Each clock with
// 'step' high moves to the next pixel; 'last' marks pixel 255 and 'done'
// pulses on the clock after it was stepped. With step tied high this is
// one address per clock (the ME controllers and MC controller 1); MC
// controller 2 steps once per received pixel.
// The function follows the document; step/busy/last are this design's.
module mb_mem_controller
  import me_pkg::*;
#(
  parameter int unsigned FRAME_W = 176,
  parameter int unsigned FRAME_H = 144,
  localparam int unsigned AW     = $clog2(FRAME_W * FRAME_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  pos_t          pos,
  input  logic          step,
  output logic          busy,
  output logic [AW-1:0] addr,
  output logic [7:0]    idx,
  output logic          last,
  output logic          done
);
  pos_t base;
  logic [3:0] col, row;

  assign idx  = {row, col};
  assign last = busy && (idx == 8'hFF);
  assign addr = AW'((32'(base.y) + 32'(row)) * FRAME_W + 32'(base.x) + 32'(col));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      base <= '0;
      col  <= '0;
      row  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        base <= pos;
        busy <= 1'b1;
        col  <= '0;
        row  <= '0;
      end else if (busy && step) begin
        {row, col} <= {row, col} + 8'd1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
