// me_pkg: constants and types shared by the inter-prediction blocks (motion
// estimation and motion compensation). A macroblock (MB) is 16x16 luma
// samples; MB positions travel as pixel coordinates of the MB's top-left
// sample, motion vectors as signed integer-pel offsets.
// Checked on its own, this package's constants appear unused; the
// modules that import it use them.
// The 16x16 MB and SAD metric are the document's; the coordinate and SAD
// widths are this design's choice.
package me_pkg;
  localparam int unsigned MB_SIZE = 16;
  localparam int unsigned CW      = 10;   // coordinate width (frames up to 1023 pixels wide/high)
  localparam int unsigned MVW     = 8;    // motion vector component width
  localparam int unsigned SADW    = 16;   // 256 * 255 fits in 16 bits

  typedef logic [CW-1:0] coord_t;
  typedef logic signed [MVW-1:0] mv_comp_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
  } pos_t;

  typedef struct packed {
    mv_comp_t x;
    mv_comp_t y;
  } mv_t;
endpackage
