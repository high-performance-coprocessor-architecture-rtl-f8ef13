// sep_filter2d: separable 2-D FIR filter built from two pipelined linear
// arrays, an X array along the line and a Y array down the columns.
//
// out(r,c) = round( sum_{i,j} cy[i] * cx[j] * in(r-i, c-j) / 2^SHIFT ),
// with in() = 0 outside the image. Every X-array result goes straight into
// the Y array at the same rate, one pixel per clock in raster order, so no
// transpose memory is needed: the Y array's PEs keep one partial column sum
// per column in their register files. The output is causal: the centre of
// the N x N window lies (N-1)/2 rows and columns before the output tag.
//
// The two-array structure and the broadcast/partial-sum schedule follow the
// published architecture; the zero padding, the causal alignment and the
// rounding shifter at the end are this design's choices.
//
// Timing: out_tag/out_data follow in_tag by 3 clocks (X array, Y array,
// shifter).
module sep_filter2d
  import lwpc_pkg::*;
#(
  parameter int unsigned N      = 7,
  parameter int unsigned LINE_W = IMG_W,
  parameter int unsigned IN_W   = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned XACC_W = 19,
  parameter int unsigned YACC_W = 30,
  parameter int unsigned OUT_W  = 16,
  parameter int unsigned SHIFT  = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [COEF_W-1:0] cx [N],
  input  logic signed [COEF_W-1:0] cy [N],
  input  tag_t                     in_tag,
  input  logic signed [IN_W-1:0]   in_data,
  output tag_t                     out_tag,
  output logic signed [OUT_W-1:0]  out_data
);

  localparam int unsigned AW = $clog2(LINE_W);

  tag_t                    tag_x;
  logic signed [XACC_W-1:0] xres;
  logic signed [YACC_W-1:0] yres;
  tag_t                    tag_y;

  pe_linear_array #(.N(N), .IN_W(IN_W), .COEF_W(COEF_W), .ACC_W(XACC_W), .DEPTH(1)) u_xarr (
    .clk, .rst_n, .in_valid(in_tag.valid), .first(in_tag.x == '0), .addr(1'b0),
    .coef(cx), .x(in_data), .out_valid(), .y(xres)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) tag_x <= '0;
    else        tag_x <= in_tag;
  end

  pe_linear_array #(.N(N), .IN_W(XACC_W), .COEF_W(COEF_W), .ACC_W(YACC_W), .DEPTH(LINE_W)) u_yarr (
    .clk, .rst_n, .in_valid(tag_x.valid), .first(tag_x.y == '0), .addr(tag_x.x[AW-1:0]),
    .coef(cy), .x(xres), .out_valid(), .y(yres)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag_y   <= '0;
      out_tag <= '0;
    end else begin
      tag_y   <= tag_x;
      out_tag <= tag_y;
    end
    if (tag_y.valid)
      out_data <= OUT_W'(sat(rshift_round(64'(yres), SHIFT), OUT_W));
  end

endmodule
