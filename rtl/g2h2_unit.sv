// g2h2_unit: orientation decomposition of one image at one scale.
//
// The image stream is filtered by the seven separable 7x7 basis filters of
// the G2/H2 quadrature pair (G2a, G2b, G2c, H2a, H2b, H2c, H2d), each a
// sep_filter2d made of an X and a Y linear array, and the seven outputs are
// steered (steer_sum) into complex responses at 0, +45 and -45 degrees.
// Basis outputs are cut to 16 bits (shift by 12, the product of the two
// 1-D coefficient scales) before steering.
//
// Separable basis (x along the line, y down the columns, factors in
// lwpc_pkg):  G2a = G2R(x)GS(y)  G2b = G2B(x)G2B(y)  G2c = GS(x)G2R(y)
//             H2a = H2A(x)GS(y)  H2b = H2B(x)H2O(y)  H2c = H2O(x)H2B(y)
//             H2d = GS(x)H2A(y)
// The seven 7x7 separable filters, their steering to +-45 degrees and the
// 16-bit outputs follow the published architecture; the tap values come
// from the steerable-filter literature. Outputs are causal: the window
// centre lies 3 rows and 3 columns before the output tag.
// Timing: 4 clocks from in_tag to out_tag.
module g2h2_unit
  import lwpc_pkg::*;
#(
  parameter int unsigned LINE_W = IMG_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  tag_t                  in_tag,
  input  logic [7:0]            in_pix,
  output tag_t                  out_tag,
  output logic signed [O_W-1:0] out_re [NUM_ORIENT],
  output logic signed [O_W-1:0] out_im [NUM_ORIENT]
);

  localparam int unsigned NB = NUM_BASIS_G + NUM_BASIS_H;

  // Tap k of the x (yaxis = 0) or y (yaxis = 1) factor of basis filter b,
  // basis order G2a G2b G2c H2a H2b H2c H2d.
  function automatic logic signed [7:0] tap(input int b, input bit yaxis, input int k);
    case (b)
      0: return yaxis ? F_GS[k]  : F_G2R[k];
      1: return F_G2B[k];
      2: return yaxis ? F_G2R[k] : F_GS[k];
      3: return yaxis ? F_GS[k]  : F_H2A[k];
      4: return yaxis ? F_H2O[k] : F_H2B[k];
      5: return yaxis ? F_H2B[k] : F_H2O[k];
      default: return yaxis ? F_H2A[k] : F_GS[k];
    endcase
  endfunction

  tag_t                  b_tag [NB];
  logic signed [O_W-1:0] b_out [NB];
  logic signed [O_W-1:0] g [NUM_BASIS_G];
  logic signed [O_W-1:0] h [NUM_BASIS_H];

  for (genvar b = 0; b < NB; b++) begin : g_basis
    logic signed [7:0] cx [7];
    logic signed [7:0] cy [7];
    for (genvar k = 0; k < 7; k++) begin : g_tap
      assign cx[k] = tap(b, 1'b0, k);
      assign cy[k] = tap(b, 1'b1, k);
    end
    sep_filter2d #(
      .N(7), .LINE_W(LINE_W), .IN_W(9), .COEF_W(8), .XACC_W(19), .YACC_W(30), .OUT_W(O_W), .SHIFT(G2H2_SHIFT)
    ) u_filt (
      .clk, .rst_n, .cx, .cy, .in_tag, .in_data(signed'({1'b0, in_pix})),
      .out_tag(b_tag[b]), .out_data(b_out[b])
    );
  end

  for (genvar b = 0; b < NUM_BASIS_G; b++) begin : g_g
    assign g[b] = b_out[b];
  end
  for (genvar b = 0; b < NUM_BASIS_H; b++) begin : g_h
    assign h[b] = b_out[NUM_BASIS_G + b];
  end

  steer_sum u_steer (.clk, .g, .h, .re(out_re), .im(out_im));

  always_ff @(posedge clk) begin
    if (!rst_n) out_tag <= '0;
    else        out_tag <= b_tag[0];
  end

endmodule
