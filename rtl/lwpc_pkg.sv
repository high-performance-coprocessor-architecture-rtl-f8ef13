// lwpc_pkg: types and constants shared by the LWPC stereo coprocessor.
//
// Every stream in the design carries a pixel tag (valid bit plus the pixel's
// column and row in the image of its own scale). Pixels move at most one per
// clock, in raster order, with no backpressure.
//
// Image size (256 columns x 360 rows), the 20-pixel disparity range, the
// three scales, three orientations, 7x7 G2/H2 filters, 16-bit filter outputs
// and the 5.3 disparity format follow the published architecture. The
// fixed-point scalings and the filter taps are this design's choices: the
// G2/H2 taps are the steerable-filter basis functions of Freeman and Adelson
// sampled at a spacing of 0.67 and scaled by 64.
package lwpc_pkg;

  localparam int unsigned IMG_W      = 256;  // pixels per line
  localparam int unsigned IMG_H      = 360;  // lines per frame
  localparam int unsigned MAX_DISP   = 20;   // largest disparity candidate
  localparam int unsigned NUM_SCALES = 3;
  localparam int unsigned NUM_ORIENT = 3;    // 0, +45, -45 degrees
  localparam int unsigned NUM_BASIS_G = 3;   // G2a, G2b, G2c
  localparam int unsigned NUM_BASIS_H = 4;   // H2a .. H2d

  localparam int unsigned PIX_W  = 8;   // grey pixel
  localparam int unsigned O_W    = 16;  // filter / steered output
  localparam int unsigned PH_W   = 9;   // normalised phasor component, Q1.7
  localparam int unsigned PH_FRAC = 7;
  localparam int unsigned C_W    = 16;  // windowed vote, 1.0 = 2^14
  localparam int unsigned S_W    = 20;  // vote summed over scales and orientations
  localparam int unsigned DISP_W = 8;   // disparity, 5 integer + 3 fraction bits
  localparam int unsigned DISP_FRAC = 3;

  localparam int unsigned XW = 9;       // column coordinate width
  localparam int unsigned YW = 9;       // row coordinate width

  typedef struct packed {
    logic          valid;
    logic [XW-1:0] x;
    logic [YW-1:0] y;
  } tag_t;

  // 1-D factors of the seven separable G2/H2 basis filters, taps at
  // positions -3..3 (index 0 = position -3), scale 64.
  typedef logic signed [7:0] coef7_t [7];
  localparam coef7_t F_G2R = '{  7,  25,  -4, -56,  -4,  25,   7 }; // 0.9213(2x^2-1)e^-x^2
  localparam coef7_t F_GS  = '{  1,  11,  41,  64,  41,  11,   1 }; // e^-x^2
  localparam coef7_t F_G2B = '{ -3, -19, -37,   0,  37,  19,   3 }; // sqrt(1.843) x e^-x^2
  localparam coef7_t F_H2A = '{ -4,   6,  48,   0, -48,  -6,   4 }; // 0.978(-2.254x+x^3)e^-x^2
  localparam coef7_t F_H2B = '{  4,  11, -12, -47, -12,  11,   4 }; // 0.978(x^2-0.7515)e^-x^2
  localparam coef7_t F_H2O = '{ -2, -14, -27,   0,  27,  14,   2 }; // x e^-x^2
  localparam int unsigned G2H2_SHIFT = 12; // 64 x 64

  // Steering gains for +-45 degrees, scale 256.
  localparam int STEER_HALF = 128;  // 1/2         (G2a, G2c)
  localparam int STEER_ONE  = 256;  // 1           (G2b)
  localparam int STEER_C3   = 91;   // cos^3(45)   (H2a, H2d)
  localparam int STEER_3C3  = 272;  // 3 cos^3(45) (H2b, H2c)

  // Round-half-up arithmetic right shift.
  function automatic logic signed [63:0] rshift_round(input logic signed [63:0] v, input int unsigned sh);
    if (sh == 0) return v;
    return (v + (64'sd1 <<< (sh - 1))) >>> sh;
  endfunction

  function automatic logic signed [63:0] sat(input logic signed [63:0] v, input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
