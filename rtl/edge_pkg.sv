// edge_pkg: shared widths, image-size encoding and mask constants of the
// edge detector.
//
// Pixels, smoothed values and edge strengths are all 8-bit unsigned. The
// run-time image width is picked with a 3-bit select (scl_sel) out of five
// power-of-two widths, 32 to 512 pixels. The select encoding (0 -> 32 ...
// 4 -> 512) is this design's choice.
//
// The smoothing mask is the sigma = 1.7, lambda = 2 power-of-two
// approximation of a 5x5 Gaussian:
//
//   2^-2        2^-2+2^-3   2^-1        2^-2+2^-3   2^-2
//   2^-2+2^-3   2^-1+2^-2   2^-1+2^-2   2^-1+2^-2   2^-2+2^-3
//   2^-1        2^-1+2^-2   2^0+2^-3    2^-1+2^-2   2^-1
//   (rows 3 and 4 mirror rows 1 and 0)
//
// times a normalisation factor 2^-4 + 2^-7. MASK_COEF holds every weight
// scaled by 2^3 so that it is an integer (2, 3, 4, 6, 9); each weight is a
// sum of at most two powers of two, so a multiplication is one or two
// shifted copies of the pixel added together. The weights sum to 105
// (13.125 before scaling). The normalisation 2^-3 * (2^-4 + 2^-7) = 9 / 2^10
// is applied to the 5x5 sum as (sum*8 + sum) >> 10, which keeps the largest
// result (255*105*9 >> 10 = 235) inside 8 bits.
package edge_pkg;

  localparam int PIX_W = 8;                 // grey level and strength width
  localparam int DIR_W = 3;                 // edge direction code width
  localparam int SEL_W = 3;                 // image size select width

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic [DIR_W-1:0] dir_t;
  typedef logic [SEL_W-1:0] size_sel_t;

  // Image widths selectable at run time.
  localparam int NUM_SIZES = 5;
  localparam int MAX_WIDTH = 512;

  typedef enum logic [SEL_W-1:0] {
    SIZE_32  = 3'd0,
    SIZE_64  = 3'd1,
    SIZE_128 = 3'd2,
    SIZE_256 = 3'd3,
    SIZE_512 = 3'd4
  } size_e;

  // Image width in pixels for a size select value; anything above 4 is
  // treated as the largest width.
  function automatic int width_of(input size_sel_t sel);
    return (sel > 3'd4) ? MAX_WIDTH : (32 << sel);
  endfunction

  // Cycles from a pixel entering the detector to its edge-map value at the
  // output, for image width w: FIFO0 2w+3, smoothing 10, FIFO1 2w+3,
  // strength 4, FIFO2 w+2, localisation 1 (2583 for w = 512).
  function automatic int total_latency(input int w);
    return (2*w + 3) + 10 + (2*w + 3) + 4 + (w + 2) + 1;
  endfunction

  // Edge direction codes. 0 marks a pixel that is not an edge. The number
  // names the direction along which the grey level changes least, i.e. the
  // direction in which the edge runs.
  localparam dir_t DIR_NONE  = 3'd0;
  localparam dir_t DIR_DIAG  = 3'd1;  // edge runs lower-left to upper-right
  localparam dir_t DIR_VERT  = 3'd2;  // edge runs vertically
  localparam dir_t DIR_ADIAG = 3'd3;  // edge runs upper-left to lower-right
  localparam dir_t DIR_HORZ  = 3'd4;  // edge runs horizontally

  // Smoothing mask, each weight times 2^3; MASK_COEF[r][c] is row r,
  // column c (the list starts at [4][4]; the mask is point-symmetric so it
  // reads the same either way).
  typedef logic [4:0][4:0][3:0] coef_mat_t;

  localparam coef_mat_t MASK_COEF = {
    4'd2, 4'd3, 4'd4, 4'd3, 4'd2,
    4'd3, 4'd6, 4'd6, 4'd6, 4'd3,
    4'd4, 4'd6, 4'd9, 4'd6, 4'd4,
    4'd3, 4'd6, 4'd6, 4'd6, 4'd3,
    4'd2, 4'd3, 4'd4, 4'd3, 4'd2
  };

  // Normalisation: result = (sum * 9) >> NORM_SHIFT, 9 applied as 2^3 + 2^0.
  localparam int NORM_SHIFT = 10;

endpackage
