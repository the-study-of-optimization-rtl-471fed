// hmea_pkg -- types and constants shared by the hierarchical motion
// estimation (HMEA) engine and the co-processor around it.
//
// Pixels are 8-bit luma samples.  A SAD is held in 16 bits, enough for a
// full 16x16 macroblock (256 * 255 = 65280).  Motion vectors are signed
// integer-pel displacements in the range the engine supports
// (level 2: -16..+16), held in 6 bits per component.
//
// The level sizes follow the three-level pyramid of the algorithm: the
// macroblock is 16x16 at level 2, 8x8 at level 1 and 4x4 at level 0, and the
// basic search of every level is a +/-2 full search (25 positions) of a
// 4x4 sub-block.  The search-window sizes (48/24/12) are this design's
// choice: the window holds every displacement up to +/-16 at level 2.
// Some constants (MB, SUB, SW1, SW0, R1, R0, ...) name the pyramid sizes for
// readers and testbenches and are not used by every module that imports the
// package; lint reports those as unused parameters.
package hmea_pkg;

  typedef logic [7:0]  pixel_t;
  typedef logic [15:0] sad_t;

  typedef struct packed {
    logic signed [5:0] y;
    logic signed [5:0] x;
  } mv_t;

  // vector in half-pel units (-32..+31 = -16.0..+15.5 pixels)
  typedef struct packed {
    logic signed [6:0] y;
    logic signed [6:0] x;
  } hmv_t;

  localparam int MB        = 16;  // macroblock size at level 2
  localparam int SUB       = 4;   // DAU block size
  localparam int LSR       = 2;   // local search range of one DAU pass
  localparam int NPOS      = (2*LSR+1)*(2*LSR+1);  // 25 positions per pass
  localparam int SW2       = 48;  // level-2 search window (pixels per side)
  localparam int SW1       = SW2/2;
  localparam int SW0       = SW2/4;
  localparam int R2        = 16;  // largest |displacement| at level 2
  localparam int R1        = R2/2;
  localparam int R0        = R2/4;

  localparam sad_t SAD_MAX = '1;

endpackage
