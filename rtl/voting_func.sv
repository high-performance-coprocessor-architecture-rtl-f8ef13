// voting_func: one disparity candidate of the local weighted phase
// correlation.
//
// For each pixel it takes the normalised left phasor L and the normalised
// right phasor R of the candidate shift and forms the real part of L * conj(R),
// Re(L)Re(R) + Im(L)Im(R), i.e. 128^2 * cos(phase difference). It then
// averages this over a small neighbourhood with a 3x3 Gaussian window
// [1 2 1] x [1 2 1] / 16 (a sep_filter2d). The window is applied once,
// after the normalisation, rather than to numerator and denominator
// separately. When `en` is low (the shifted right pixel lies outside the
// line) the vote is 0. Output: 16 bits, 1.0 = 16384, saturated.
//
// The cross product of normalised responses followed by the window follows
// the published architecture; the window size and taps are this design's.
// Timing: 4 clocks (product register + window). The window's output is
// causal: its centre lies 1 row and 1 column before out_tag.
module voting_func
  import lwpc_pkg::*;
#(
  parameter int unsigned LINE_W = IMG_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  tag_t                   in_tag,
  input  logic                   en,
  input  logic signed [PH_W-1:0] l_re,
  input  logic signed [PH_W-1:0] l_im,
  input  logic signed [PH_W-1:0] r_re,
  input  logic signed [PH_W-1:0] r_im,
  output tag_t                   out_tag,
  output logic signed [C_W-1:0]  out_c
);

  logic signed [2:0]  win [3];
  assign win = '{3'sd1, 3'sd2, 3'sd1};

  tag_t               p_tag;
  logic signed [18:0] prod;

  always_ff @(posedge clk) begin
    if (!rst_n) p_tag <= '0;
    else        p_tag <= in_tag;
    prod <= en ? 19'(l_re * r_re) + 19'(l_im * r_im) : '0;
  end

  sep_filter2d #(
    .N(3), .LINE_W(LINE_W), .IN_W(19), .COEF_W(3), .XACC_W(22), .YACC_W(25), .OUT_W(C_W), .SHIFT(4)
  ) u_win (
    .clk, .rst_n, .cx(win), .cy(win), .in_tag(p_tag), .in_data(prod),
    .out_tag, .out_data(out_c)
  );

endmodule
