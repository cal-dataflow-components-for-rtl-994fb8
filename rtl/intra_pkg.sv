// intra_pkg: types shared by the intra prediction engine. pe_ctl_t is the
// bundle the PE controller drives into each processing element per
// prediction iteration: four adder operands, the D-register select (acc=1:
// keep the sum for the controller only, no predictor output), the round
// value and shift of the Round Shift Clip, and the bypass line.
// Checked on its own, this package's constants appear unused; the
// modules that import it use them.
// The PE control fields mirror the document's PE structure; their
// encoding is this design's choice.
package intra_pkg;
  localparam int unsigned OW     = 18;  // operand / accumulator width (signed)
  localparam int unsigned NUM_PE = 4;

  typedef logic signed [OW-1:0] opnd_t;

  typedef struct packed {
    opnd_t      op0;
    opnd_t      op1;
    opnd_t      op2;
    opnd_t      op3;
    logic       acc;
    logic [4:0] round;
    logic [2:0] shift;
    logic       byp;
    logic [7:0] bval;
  } pe_ctl_t;

  // prediction block size
  typedef enum logic {BLK4 = 1'b0, BLK16 = 1'b1} blk_t;
endpackage
