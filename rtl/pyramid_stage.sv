// pyramid_stage: one level of the Gaussian pyramid: an anti-aliasing
// low-pass filter followed by down-sampling by 2 in both directions.
//
// The low-pass filter is a 3-tap Gaussian [1 2 1]/4 applied along the line
// and down the columns (a 3x3 kernel summing to 16), computed on a
// sep_filter2d pair of linear arrays, with zero padding and rounding. Of the
// filtered image only pixels with odd column and odd row are kept; pixel
// (x, y) becomes pixel (x>>1, y>>1) of the half-size image. Because the
// filter is causal, the kept pixel is the low-pass value centred on
// (x-1, y-1), so output (u, v) represents input position (2u, 2v).
//
// The 3-tap Gaussian and the factor-2 decimation follow the published
// architecture; the [1 2 1] taps and the choice of the odd pixels are this
// design's. Timing: 3 clocks from in_tag to out_tag; out_tag.valid is high
// for one in four input pixels.
module pyramid_stage
  import lwpc_pkg::*;
#(
  parameter int unsigned IN_W = IMG_W  // width of the input image
) (
  input  logic        clk,
  input  logic        rst_n,
  input  tag_t        in_tag,
  input  logic [7:0]  in_pix,
  output tag_t        out_tag,
  output logic [7:0]  out_pix
);

  logic signed [3:0] taps [3];
  assign taps = '{4'sd1, 4'sd2, 4'sd1};

  tag_t              f_tag;
  logic signed [9:0] f_data;

  sep_filter2d #(
    .N(3), .LINE_W(IN_W), .IN_W(9), .COEF_W(4), .XACC_W(12), .YACC_W(15), .OUT_W(10), .SHIFT(4)
  ) u_lpf (
    .clk, .rst_n, .cx(taps), .cy(taps), .in_tag, .in_data(signed'({1'b0, in_pix})),
    .out_tag(f_tag), .out_data(f_data)
  );

  always_comb begin
    out_tag       = '0;
    out_tag.valid = f_tag.valid & f_tag.x[0] & f_tag.y[0];
    out_tag.x     = f_tag.x >> 1;
    out_tag.y     = f_tag.y >> 1;
    out_pix       = (f_data > 10'sd255) ? 8'd255 : f_data[7:0];
  end

endmodule
