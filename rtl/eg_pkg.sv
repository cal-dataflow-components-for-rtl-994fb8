// eg_pkg: shared definitions of the Exp-Golomb coder. A syntax element is
// coded with one of four mappings to a code number: unsigned (ue),
// signed (se), truncated (te) and mapped (me, coded_block_pattern).
// Code numbers are up to CNW bits, codewords up to 2*CNW-1 bits.
// Checked on its own, this package's constants appear unused; the
// modules that import it use them.
// Widths are this design's choice; the four mapping types are the
// document's.
package eg_pkg;
  localparam int unsigned VW   = 16;           // syntax element value width
  localparam int unsigned CNW  = VW + 1;       // code_num width

  typedef enum logic [1:0] {EG_UE = 2'd0, EG_SE = 2'd1, EG_TE = 2'd2, EG_ME = 2'd3} eg_type_t;
  typedef enum logic {PM_INTRA = 1'b0, PM_INTER = 1'b1} pmode_t;
endpackage
