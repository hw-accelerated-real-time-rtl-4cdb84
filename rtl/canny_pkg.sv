// canny_pkg: types and constants shared by the Canny edge-detection pipeline.
//
// Pixels are 8-bit grayscale throughout. The gradient phase emits one 16-bit
// beat per pixel that packs the 8-bit gradient magnitude (upper byte) with the
// gradient orientation (lower byte). The orientation is the gradient angle
// rounded to the nearest of 0, 45, 90 or 135 degrees and is carried as that
// number of degrees. The classified pixels after thresholding are 0 (no edge),
// WEAK_DEF (candidate) or STRONG (edge). The packing order, the orientation
// code and the weak value are choices of this design.
package canny_pkg;

  typedef logic [7:0] pixel_t;

  // One beat of the gradient stream: {magnitude, orientation}.
  typedef struct packed {
    logic [7:0] mag;
    logic [7:0] dir;
  } grad_t;

  // Orientation codes, in degrees.
  localparam logic [7:0] DIR_0   = 8'd0;
  localparam logic [7:0] DIR_45  = 8'd45;
  localparam logic [7:0] DIR_90  = 8'd90;
  localparam logic [7:0] DIR_135 = 8'd135;

  localparam pixel_t STRONG   = 8'd255;
  localparam pixel_t WEAK_DEF = 8'd128;

  // tan(22.5 deg) and tan(67.5 deg) in 1/256 units, used to round the
  // gradient angle to the nearest multiple of 45 degrees.
  localparam int unsigned TAN22_Q8 = 106;
  localparam int unsigned TAN67_Q8 = 618;

  // Window tap index: row-major, tap(dr,dc) = (dr+1)*3 + (dc+1), dr,dc in -1..1.
  localparam int TAP_C = 4;

endpackage
