// sad_unit: sum of absolute differences between a candidate MB and the
// current MB. Takes one pixel pair per clock (in_valid, a, b); 'last' marks
// the 256th pair, after which score/score_valid appear on the next clock
// together with the tag (the candidate's coordinates) given with the last
// pair. The accumulator restarts after every 'last'.
// SAD as the matching metric is the document's; one pair per clock and the
// tag passing are this design's choice.
module sad_unit
  import me_pkg::*;
#(
  parameter int unsigned TAGW = 2 * CW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [7:0]      a,
  input  logic [7:0]      b,
  input  logic            last,
  input  logic [TAGW-1:0] tag_in,
  output logic [SADW-1:0] score,
  output logic            score_valid,
  output logic [TAGW-1:0] tag_out
);
  logic [SADW-1:0] acc;
  logic [7:0]      diff;

  assign diff = (a > b) ? (a - b) : (b - a);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc         <= '0;
      score       <= '0;
      score_valid <= 1'b0;
      tag_out     <= '0;
    end else begin
      score_valid <= 1'b0;
      if (in_valid) begin
        if (last) begin
          score       <= acc + SADW'(diff);
          score_valid <= 1'b1;
          tag_out     <= tag_in;
          acc         <= '0;
        end else begin
          acc <= acc + SADW'(diff);
        end
      end
    end
  end
endmodule
