// steer_sum: steers the seven G2/H2 basis filter outputs to the three
// orientations used for matching, 0, +45 and -45 degrees (0 = vertical).
//
// A steerable filter at angle t is a fixed linear mix of its basis:
//   G2(t) = cos^2 t G2a - 2 cos t sin t G2b + sin^2 t G2c
//   H2(t) = cos^3 t H2a - 3 cos^2 t sin t H2b + 3 cos t sin^2 t H2c - sin^3 t H2d
// At 0 degrees this is G2a / H2a; at +-45 degrees the gains are 1/2, -+1, 1/2
// and 0.354, -+1.061, 1.061, -+0.354, held here as integers scaled by 256.
// G2 gives the real and H2 the imaginary part of each complex output.
// Results are rounded and saturated to 16 bits.
//
// Steering to these three orientations follows the published architecture;
// the formulas are those of the steerable-filter literature and the 8-bit
// fraction of the gains is this design's choice. Timing: 1 clock.
module steer_sum
  import lwpc_pkg::*;
(
  input  logic                  clk,
  input  logic signed [O_W-1:0] g [NUM_BASIS_G],
  input  logic signed [O_W-1:0] h [NUM_BASIS_H],
  output logic signed [O_W-1:0] re [NUM_ORIENT],
  output logic signed [O_W-1:0] im [NUM_ORIENT]
);

  logic signed [31:0] gp, gm, hp, hm;

  always_comb begin
    // +45 degrees: sin = +cos; -45 degrees: sin = -cos
    gp = STEER_HALF * (32'(g[0]) + 32'(g[2])) - STEER_ONE * 32'(g[1]);
    gm = STEER_HALF * (32'(g[0]) + 32'(g[2])) + STEER_ONE * 32'(g[1]);
    hp = STEER_C3 * (32'(h[0]) - 32'(h[3])) + STEER_3C3 * (32'(h[2]) - 32'(h[1]));
    hm = STEER_C3 * (32'(h[0]) + 32'(h[3])) + STEER_3C3 * (32'(h[2]) + 32'(h[1]));
  end

  always_ff @(posedge clk) begin
    re[0] <= g[0];
    im[0] <= h[0];
    re[1] <= O_W'(sat(rshift_round(64'(gp), 8), O_W));
    im[1] <= O_W'(sat(rshift_round(64'(hp), 8), O_W));
    re[2] <= O_W'(sat(rshift_round(64'(gm), 8), O_W));
    im[2] <= O_W'(sat(rshift_round(64'(hm), 8), O_W));
  end

endmodule
