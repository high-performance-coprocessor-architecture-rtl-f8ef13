// scaling_unit: builds the three-level Gaussian pyramid of one image.
//
// Scale 1 is the input image itself. Scale 2 is the input passed through a
// pyramid_stage (3-tap Gaussian low-pass, keep every second row and column)
// and scale 3 is scale 2 passed through a second pyramid_stage. Each scale
// leaves as its own pixel stream with its own tag: scale 2 carries one
// pixel per 4 input pixels, scale 3 one per 16.
//
// The two filter-and-down-sample steps follow the published architecture;
// bringing the scales out as three parallel streams (instead of
// multiplexing them onto one filter bank) is this design's choice.
// Timing: scale 1 is registered once (1 clock), scale 2 follows the input by
// 3 clocks, scale 3 by 6 clocks.
module scaling_unit
  import lwpc_pkg::*;
#(
  parameter int unsigned IMG_W_P = IMG_W
) (
  input  logic       clk,
  input  logic       rst_n,
  input  tag_t       in_tag,
  input  logic [7:0] in_pix,
  output tag_t       s_tag [NUM_SCALES],
  output logic [7:0] s_pix [NUM_SCALES]
);

  always_ff @(posedge clk) begin
    if (!rst_n) s_tag[0] <= '0;
    else        s_tag[0] <= in_tag;
    s_pix[0] <= in_pix;
  end

  pyramid_stage #(.IN_W(IMG_W_P)) u_lvl2 (
    .clk, .rst_n, .in_tag, .in_pix, .out_tag(s_tag[1]), .out_pix(s_pix[1])
  );

  pyramid_stage #(.IN_W(IMG_W_P / 2)) u_lvl3 (
    .clk, .rst_n, .in_tag(s_tag[1]), .in_pix(s_pix[1]), .out_tag(s_tag[2]), .out_pix(s_pix[2])
  );

endmodule
