// peak_detect: picks the disparity with the largest combined vote and
// refines it to 1/8 pixel.
//
// t = argmax_d S(d) (ties go to the smaller d). The sub-pixel offset comes
// from the parabola through S(t-1), S(t), S(t+1):
//   offset = (S(t+1) - S(t-1)) / (2 * (2 S(t) - S(t-1) - S(t+1)))
// rounded to the nearest 1/8 and clamped to [-1/2, +1/2]. At t = 0, t = ND-1
// or a flat top the offset is 0. The result is t*8 + offset*8, 5 integer and
// 3 fraction bits.
//
// Peak search with a quadratic fit over the two neighbours and the 5.3
// format follow the published architecture; rounding, clamping and the tie
// rule are this design's choices. Timing: 1 clock.
module peak_detect
  import lwpc_pkg::*;
#(
  parameter int unsigned ND = MAX_DISP + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  tag_t                    in_tag,
  input  logic signed [S_W-1:0]   s [ND],
  output tag_t                    out_tag,
  output logic [DISP_W-1:0]       disparity,
  output logic [$clog2(ND)-1:0]   peak_int,
  output logic signed [3:0]       peak_frac
);

  localparam int unsigned TW = $clog2(ND);

  logic [TW-1:0]           t;
  logic signed [S_W-1:0]   best, sl, sr;
  logic signed [S_W+2:0]   den, num;
  logic signed [S_W+3:0]   q;
  logic signed [3:0]       off;

  always_comb begin
    t    = '0;
    best = s[0];
    for (int d = 1; d < ND; d++) begin
      if (s[d] > best) begin
        best = s[d];
        t    = TW'(d);
      end
    end
    sl  = (t == '0) ? best : s[(t == '0) ? 0 : 32'(t) - 1];
    sr  = (32'(t) == ND - 1) ? best : s[(32'(t) == ND - 1) ? ND - 1 : 32'(t) + 1];
    den = 2 * (S_W+3)'(best) - (S_W+3)'(sl) - (S_W+3)'(sr);
    num = 8 * ((S_W+3)'(sr) - (S_W+3)'(sl));
    off = '0;
    q   = '0;
    if (t != '0 && 32'(t) != ND - 1 && den != '0) begin
      // round(num / (2 den)) with halves away from zero
      q = ((S_W+4)'(num) + ((num >= 0) ? (S_W+4)'(den) : -(S_W+4)'(den))) / (2 * (S_W+4)'(den));
      if (q > 4)       off = 4'sd4;
      else if (q < -4) off = -4'sd4;
      else             off = 4'(q);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_tag <= '0;
    else        out_tag <= in_tag;
    peak_int  <= t;
    peak_frac <= off;
    disparity <= DISP_W'(signed'({1'b0, t, 3'b000}) + off);
  end

endmodule
