// mv_adder: the motion compensator's Adder. Displaces an MB position by
// its motion vector to get the position of the compensating reference MB:
// ref = pos + mv per component (two's complement, combinational). The
// vector comes from the full search, so the result lies inside the frame.
// Adding the vector to the MB position is the document's; the component
// widths are this design's choice.
module mv_adder
  import me_pkg::*;
(
  input  pos_t pos,
  input  mv_t  mv,
  output pos_t ref_pos
);
  assign ref_pos.x = pos.x + coord_t'(signed'(mv.x));
  assign ref_pos.y = pos.y + coord_t'(signed'(mv.y));
endmodule
