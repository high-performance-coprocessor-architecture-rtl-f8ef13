// lwpc_coprocessor: real-time dense disparity map coprocessor based on local
// weighted phase correlation (LWPC).
//
// A rectified stereo pair enters as two 8-bit grey pixel streams in raster
// order, one left/right pixel pair per clock when in_valid is high. The
// datapath is a pipeline of four stages, each a set of identical units
// working side by side (SIMD) on the same pixel:
//   1. scaling_unit (left, right): 3-level Gaussian pyramid.
//   2. g2h2_unit (per image and scale): seven separable 7x7 G2/H2 basis
//      filters on X/Y linear arrays, steered to 0, +45 and -45 degrees.
//   3. phase_corr_unit (per scale and orientation): normalised phase
//      difference against every shifted right pixel, windowed.
//      Scale s checks MAX_DISP >> (s-1) + 1 shifts.
//   4. interp_unit + peak_detect: coarse scales interpolated and added to
//      the finest, best shift found and refined to 1/8 pixel.
// Output: one 5.3 disparity per pixel (disp_x, disp_y) for x <= IMG_W-1-LAG
// and y <= IMG_H-1-LAG (LAG = 4); the filters are causal, so the pixels of
// the last LAG columns and rows have no result. The disparity d of a left
// pixel x is the shift to right pixel x - d.
//
// The stage structure, sizes and output format follow the published
// architecture. Separate chains per scale (instead of one filter bank shared
// by the scales), the stream interface and the output coordinate convention
// are this design's choices. The frame buffer reader, external memory and
// the depth conversion sit outside this module.
//
// Timing: a disparity leaves about DELAY_ROWS (16) lines plus 17 clocks
// after its left/right pixels; throughput one pixel per clock. Frames follow
// each other without gaps; the last 16 + LAG lines of a frame come out while
// the next frame (or blank lines) is fed.
module lwpc_coprocessor
  import lwpc_pkg::*;
#(
  parameter int unsigned IMG_W_P  = IMG_W,
  parameter int unsigned IMG_H_P  = IMG_H,
  parameter int unsigned MAX_DISP_P = MAX_DISP
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [7:0]        left_pix,
  input  logic [7:0]        right_pix,
  output logic              disp_valid,
  output logic [XW-1:0]     disp_x,
  output logic [YW-1:0]     disp_y,
  output logic [DISP_W-1:0] disparity
);

  localparam int unsigned LAG = 4;
  localparam int unsigned ND  = MAX_DISP_P + 1;
  localparam int unsigned NDS [NUM_SCALES] = '{ND, (ND - 1) / 2 + 1, (ND - 1) / 4 + 1};

  // ---- pixel coordinates ----------------------------------------------------
  tag_t in_tag;
  logic [XW-1:0] xc;
  logic [YW-1:0] yc;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xc <= '0;
      yc <= '0;
    end else if (in_valid) begin
      if (32'(xc) == IMG_W_P - 1) begin
        xc <= '0;
        yc <= (32'(yc) == IMG_H_P - 1) ? '0 : yc + 1'b1;
      end else begin
        xc <= xc + 1'b1;
      end
    end
  end
  assign in_tag = '{valid: in_valid, x: xc, y: yc};

  // ---- stage 1: scaling ------------------------------------------------------
  tag_t       ls_tag [NUM_SCALES], rs_tag [NUM_SCALES];
  logic [7:0] ls_pix [NUM_SCALES], rs_pix [NUM_SCALES];

  scaling_unit #(.IMG_W_P(IMG_W_P)) u_scale_l (
    .clk, .rst_n, .in_tag, .in_pix(left_pix), .s_tag(ls_tag), .s_pix(ls_pix));
  scaling_unit #(.IMG_W_P(IMG_W_P)) u_scale_r (
    .clk, .rst_n, .in_tag, .in_pix(right_pix), .s_tag(rs_tag), .s_pix(rs_pix));

  // ---- stages 2 and 3 per scale -------------------------------------------------
  tag_t                  c_tag [NUM_SCALES];
  logic signed [C_W-1:0] c1 [NUM_ORIENT][NDS[0]];
  logic signed [C_W-1:0] c2 [NUM_ORIENT][NDS[1]];
  logic signed [C_W-1:0] c3 [NUM_ORIENT][NDS[2]];

  for (genvar s = 0; s < NUM_SCALES; s++) begin : g_scale
    localparam int unsigned LW = IMG_W_P >> s;
    localparam int unsigned NDL = NDS[s];
    tag_t                  lo_tag, ro_tag;
    logic signed [O_W-1:0] l_re [NUM_ORIENT], l_im [NUM_ORIENT];
    logic signed [O_W-1:0] r_re [NUM_ORIENT], r_im [NUM_ORIENT];
    tag_t                  p_tag [NUM_ORIENT];
    logic signed [C_W-1:0] c [NUM_ORIENT][NDL];

    g2h2_unit #(.LINE_W(LW)) u_g2h2_l (
      .clk, .rst_n, .in_tag(ls_tag[s]), .in_pix(ls_pix[s]), .out_tag(lo_tag), .out_re(l_re), .out_im(l_im));
    g2h2_unit #(.LINE_W(LW)) u_g2h2_r (
      .clk, .rst_n, .in_tag(rs_tag[s]), .in_pix(rs_pix[s]), .out_tag(ro_tag), .out_re(r_re), .out_im(r_im));

    for (genvar o = 0; o < NUM_ORIENT; o++) begin : g_orient
      phase_corr_unit #(.ND(NDL), .LINE_W(LW)) u_pc (
        .clk, .rst_n, .in_tag(lo_tag), .l_re(l_re[o]), .l_im(l_im[o]), .r_re(r_re[o]), .r_im(r_im[o]),
        .out_tag(p_tag[o]), .c(c[o]));
    end
    assign c_tag[s] = p_tag[0];

    for (genvar o = 0; o < NUM_ORIENT; o++) begin : g_out
      for (genvar d = 0; d < NDL; d++) begin : g_d
        if (s == 0)      begin : g_s1 assign c1[o][d] = c[o][d]; end
        else if (s == 1) begin : g_s2 assign c2[o][d] = c[o][d]; end
        else             begin : g_s3 assign c3[o][d] = c[o][d]; end
      end
    end
  end

  // ---- stage 4: interpolation and peak detection ----------------------------------
  tag_t                  i_tag, p_out_tag;
  logic signed [S_W-1:0] s_sum [ND];
  logic [$clog2(ND)-1:0] peak_int;
  logic signed [3:0]     peak_frac;
  logic [DISP_W-1:0]     disp_raw;

  interp_unit #(.W1(IMG_W_P), .H1(IMG_H_P), .ND(ND), .LAG(LAG)) u_interp (
    .clk, .rst_n, .s1_tag(c_tag[0]), .c1, .s2_tag(c_tag[1]), .c2, .s3_tag(c_tag[2]), .c3,
    .out_tag(i_tag), .s_out(s_sum));

  peak_detect #(.ND(ND)) u_peak (
    .clk, .rst_n, .in_tag(i_tag), .s(s_sum), .out_tag(p_out_tag), .disparity(disp_raw),
    .peak_int, .peak_frac);

  // ---- output: causal tag -> window centre ---------------------------------------
  always_comb begin
    disp_valid = p_out_tag.valid && 32'(p_out_tag.x) >= LAG && 32'(p_out_tag.y) >= LAG;
    disp_x     = p_out_tag.x - XW'(LAG);
    disp_y     = p_out_tag.y - YW'(LAG);
    disparity  = disp_raw;
  end

endmodule
