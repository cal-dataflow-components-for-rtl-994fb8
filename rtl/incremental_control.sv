// incremental_control: the motion compensator's sequencer. 'start' clears
// the MB raster scanner (write phase). In the write phase every rx_mb_done
// from the receiver (a compensated MB fully received) becomes an INCR to
// the scanner; when the scanner reports done, a second CLR restarts it and
// 'to_read' flips the R/W switches to read. In the read phase every
// rd_mb_done (an MB read out) becomes an INCR; when the scanner is done
// again, frame_done pulses, 'to_write' flips the switches back and the
// block returns to idle. All outputs are combinational from state/inputs.
// The Start/CLR/INCR roles follow the document; the two-phase sequencing is
// this design's reading of it.
module incremental_control (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic rx_mb_done,
  input  logic rd_mb_done,
  input  logic scan_done,
  output logic clr,
  output logic incr,
  output logic to_read,
  output logic to_write,
  output logic read_phase,
  output logic frame_done
);
  typedef enum logic [1:0] {P_IDLE, P_WRITE, P_READ} phase_t;
  phase_t phase;

  always_comb begin
    clr        = 1'b0;
    incr       = 1'b0;
    to_read    = 1'b0;
    to_write   = 1'b0;
    frame_done = 1'b0;
    unique case (phase)
      P_IDLE:  clr = start;
      P_WRITE: begin
        incr    = rx_mb_done;
        clr     = scan_done;
        to_read = scan_done;
      end
      P_READ: begin
        incr       = rd_mb_done;
        frame_done = scan_done;
        to_write   = scan_done;
      end
      default: ;
    endcase
  end

  assign read_phase = (phase == P_READ);

  always_ff @(posedge clk) begin
    if (!rst_n) phase <= P_IDLE;
    else begin
      unique case (phase)
        P_IDLE:  if (start)     phase <= P_WRITE;
        P_WRITE: if (scan_done) phase <= P_READ;
        P_READ:  if (scan_done) phase <= P_IDLE;
        default: phase <= P_IDLE;
      endcase
    end
  end
endmodule
