// full_search: the search-algorithm module for full search. On a start
// pulse it takes the current MB position, clips a +/-SEARCH_RANGE window
// to the frame, and then offers every candidate MB position of the window
// in raster order on a valid/ready handshake (cand/cand_valid/cand_ready).
// n_comp (number of candidates = comparisons the comparator must make) is
// valid with n_valid, one clock after start; 'done' pulses after the last
// candidate has been taken.
// Full search and the '# Comparisons' output follow the document; the
// window size and its clipping to the frame are this design's choice.
module full_search
  import me_pkg::*;
#(
  parameter int unsigned FRAME_W      = 176,
  parameter int unsigned FRAME_H      = 144,
  parameter int unsigned SEARCH_RANGE = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  pos_t        pos,
  output pos_t        cand,
  output logic        cand_valid,
  input  logic        cand_ready,
  output logic [15:0] n_comp,
  output logic        n_valid,
  output logic        done
);
  localparam int MAX_X = int'(FRAME_W) - int'(MB_SIZE);
  localparam int MAX_Y = int'(FRAME_H) - int'(MB_SIZE);
  localparam int R     = int'(SEARCH_RANGE);

  int x0, x1, y0, y1;
  coord_t xmin, xmax, ymax;

  always_comb begin
    x0 = int'(pos.x) - R;  if (x0 < 0) x0 = 0;
    y0 = int'(pos.y) - R;  if (y0 < 0) y0 = 0;
    x1 = int'(pos.x) + R;  if (x1 > MAX_X) x1 = MAX_X;
    y1 = int'(pos.y) + R;  if (y1 > MAX_Y) y1 = MAX_Y;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cand_valid <= 1'b0;
      n_valid    <= 1'b0;
      done       <= 1'b0;
      n_comp     <= '0;
      cand       <= '0;
      xmin       <= '0;
      xmax       <= '0;
      ymax       <= '0;
    end else begin
      n_valid <= 1'b0;
      done    <= 1'b0;
      if (start) begin
        xmin       <= coord_t'(x0);
        xmax       <= coord_t'(x1);
        ymax       <= coord_t'(y1);
        cand.x     <= coord_t'(x0);
        cand.y     <= coord_t'(y0);
        n_comp     <= 16'((x1 - x0 + 1) * (y1 - y0 + 1));
        n_valid    <= 1'b1;
        cand_valid <= 1'b1;
      end else if (cand_valid && cand_ready) begin
        if (cand.x == xmax) begin
          cand.x <= xmin;
          if (cand.y == ymax) begin
            cand_valid <= 1'b0;
            done       <= 1'b1;
          end else begin
            cand.y <= cand.y + 1'b1;
          end
        end else begin
          cand.x <= cand.x + 1'b1;
        end
      end
    end
  end
endmodule
