// mv_calculator: motion vector of an MB as the displacement from the
// current MB's position to its best match, mv = best - current, per
// component. Combinational.
// The subtraction is the document's; the sign convention (best minus
// current, so the motion compensator adds the vector to the MB position)
// is this design's reading.
module mv_calculator
  import me_pkg::*;
(
  input  pos_t cur_pos,
  input  pos_t best_pos,
  output mv_t  mv
);
  assign mv.x = mv_comp_t'($signed({1'b0, best_pos.x}) - $signed({1'b0, cur_pos.x}));
  assign mv.y = mv_comp_t'($signed({1'b0, best_pos.y}) - $signed({1'b0, cur_pos.y}));
endmodule
