// mb_raster_scanner: walks the macroblocks of a frame in raster order.
// clr restarts at MB (0,0); incr advances to the next MB. Each new position
// is announced by a one-clock pos_valid pulse one clock after clr/incr, with
// pos holding the pixel coordinates of the MB's top-left sample. An incr on
// the last MB raises done (no pos_valid) until the next clr.
// CLR/INCR inputs and x/y outputs are the document's; the timing is this
// design's choice.
module mb_raster_scanner
  import me_pkg::*;
#(
  parameter int unsigned FRAME_W = 176,
  parameter int unsigned FRAME_H = 144
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic incr,
  output pos_t pos,
  output logic pos_valid,
  output logic done
);
  localparam coord_t LAST_X = coord_t'(FRAME_W - MB_SIZE);
  localparam coord_t LAST_Y = coord_t'(FRAME_H - MB_SIZE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos       <= '0;
      pos_valid <= 1'b0;
      done      <= 1'b0;
    end else begin
      pos_valid <= 1'b0;
      if (clr) begin
        pos       <= '0;
        pos_valid <= 1'b1;
        done      <= 1'b0;
      end else if (incr && !done) begin
        if (pos.x == LAST_X && pos.y == LAST_Y) begin
          done <= 1'b1;
        end else begin
          pos_valid <= 1'b1;
          if (pos.x == LAST_X) begin
            pos.x <= '0;
            pos.y <= pos.y + coord_t'(MB_SIZE);
          end else begin
            pos.x <= pos.x + coord_t'(MB_SIZE);
          end
        end
      end
    end
  end
endmodule
