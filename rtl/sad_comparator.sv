// sad_comparator: picks the best candidate of one MB. 'start' with n_comp
// (the search module's number of comparisons) arms it; each score_valid
// brings a SAD score and its candidate position. A score strictly below
// the best so far replaces it, so the first of equal scores wins. When
// n_comp scores have arrived, best_valid pulses for one clock with the best
// position and the minimum score.
// The behaviour is the document's; the tie rule is this design's choice.
module sad_comparator
  import me_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [15:0]     n_comp,
  input  logic            score_valid,
  input  logic [SADW-1:0] score,
  input  pos_t            cand,
  output pos_t            best_pos,
  output logic [SADW-1:0] min_score,
  output logic            best_valid
);
  logic [15:0] remaining;
  logic        first;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      remaining  <= '0;
      first      <= 1'b0;
      best_pos   <= '0;
      min_score  <= '0;
      best_valid <= 1'b0;
    end else begin
      best_valid <= 1'b0;
      if (start) begin
        remaining <= n_comp;
        first     <= 1'b1;
      end else if (score_valid && remaining != 0) begin
        first <= 1'b0;
        if (first || score < min_score) begin
          min_score <= score;
          best_pos  <= cand;
        end
        remaining <= remaining - 1'b1;
        if (remaining == 16'd1) best_valid <= 1'b1;
      end
    end
  end
endmodule
