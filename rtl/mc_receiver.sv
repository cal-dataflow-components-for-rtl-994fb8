// mc_receiver: takes the compensated MB pixels coming back from the
// reference frame memory and relays them (same clock) to the compensated
// frame memory and the subtractor, together with their index 0..255 inside
// the MB. mb_done pulses one clock after the 256th pixel; the motion
// compensator turns it into the INCR that fetches the next MB.
// Relaying and the MB-complete signal follow the document; the index output
// is this design's way of pairing each pixel with the current MB pixel.
module mc_receiver (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic [7:0] idx,
  output logic       mb_done
);
  assign out_valid = in_valid;
  assign out_data  = in_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx     <= '0;
      mb_done <= 1'b0;
    end else begin
      mb_done <= in_valid && (idx == 8'hFF);
      if (in_valid) idx <= idx + 1'b1;
    end
  end
endmodule
