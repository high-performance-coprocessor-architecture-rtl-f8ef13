// interp_unit: combines the votes of the three scales into S(x, d).
//
// Each scale's votes are first summed over the orientations. The two coarse
// scales are written into row memories (16 rows per frame, two frames kept
// apart by a frame-parity address bit). The finest scale is delayed by
// DELAY_ROWS lines in a line memory so that, when a fine pixel leaves the
// delay, the coarse rows covering it have already been computed. For fine
// output pixel x at disparity d the coarse contributions are read at
//   x_s = (x - LAG + LAG * 2^(s-1)) >> (s-1)        (same for rows, clamped)
// which lines up the window centres of the causal filters of every scale
// (LAG = 4 pixels: 3 from the 7x7 filters, 1 from the 3x3 window). Across x
// the coarse value is held over the 2 or 4 fine pixels it covers; across d
// it is interpolated linearly: scale 2 at d/2, scale 3 at d/4.
//   S(d) = S1(d) + S2(d/2) + S3(d/4)
//
// Interpolating the two coarse scales in x and d and adding them to the
// finest scale follows the published architecture; the published design
// keeps coarse results in external memory, this one in on-chip row memories.
// The hold-in-x / linear-in-d scheme and the lag correction are this
// design's. Timing: out_tag appears 2 clocks after the fine input pixel that
// arrives DELAY_ROWS lines after the output pixel; the first DELAY_ROWS lines
// after reset give no output, and the last DELAY_ROWS lines of a frame come
// out while the next frame is fed.
module interp_unit
  import lwpc_pkg::*;
#(
  parameter int unsigned W1   = IMG_W,
  parameter int unsigned H1   = IMG_H,
  parameter int unsigned ND   = MAX_DISP + 1,  // fine candidates, (ND-1) % 4 == 0
  parameter int unsigned DELAY_ROWS = 16,
  parameter int unsigned LAG  = 4,
  localparam int unsigned ND2 = (ND - 1) / 2 + 1,
  localparam int unsigned ND3 = (ND - 1) / 4 + 1,
  localparam int unsigned V_W = C_W + 2            // sum of 3 orientations
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  tag_t                  s1_tag,
  input  logic signed [C_W-1:0] c1 [NUM_ORIENT][ND],
  input  tag_t                  s2_tag,
  input  logic signed [C_W-1:0] c2 [NUM_ORIENT][ND2],
  input  tag_t                  s3_tag,
  input  logic signed [C_W-1:0] c3 [NUM_ORIENT][ND3],
  output tag_t                  out_tag,
  output logic signed [S_W-1:0] s_out [ND]
);

  localparam int unsigned W2 = W1 / 2, W3 = W1 / 4;
  localparam int unsigned H2 = H1 / 2, H3 = H1 / 4;
  localparam int unsigned SLOTS = 16;

  typedef logic signed [ND-1:0][V_W-1:0]  vec1_t;
  typedef logic signed [ND2-1:0][V_W-1:0] vec2_t;
  typedef logic signed [ND3-1:0][V_W-1:0] vec3_t;
  typedef struct packed {
    logic          par;
    logic [YW-1:0] y;
    vec1_t         v;
  } dent_t;

  // ---- orientation sums ------------------------------------------------
  vec1_t v1;
  vec2_t v2;
  vec3_t v3;
  always_comb begin
    for (int d = 0; d < ND; d++)
      v1[d] = V_W'(c1[0][d]) + V_W'(c1[1][d]) + V_W'(c1[2][d]);
    for (int d = 0; d < ND2; d++)
      v2[d] = V_W'(c2[0][d]) + V_W'(c2[1][d]) + V_W'(c2[2][d]);
    for (int d = 0; d < ND3; d++)
      v3[d] = V_W'(c3[0][d]) + V_W'(c3[1][d]) + V_W'(c3[2][d]);
  end

  // ---- frame parity of every stream (flips on pixel (0,0)) ---------------
  logic par1, par2, par3;
  function automatic logic sof(input tag_t t);
    return t.valid && t.x == '0 && t.y == '0;
  endfunction
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      par1 <= 1'b0; par2 <= 1'b0; par3 <= 1'b0;
    end else begin
      if (sof(s1_tag)) par1 <= ~par1;
      if (sof(s2_tag)) par2 <= ~par2;
      if (sof(s3_tag)) par3 <= ~par3;
    end
  end
  logic cur1, cur2, cur3;  // parity of the frame the current pixel belongs to
  assign cur1 = sof(s1_tag) ? ~par1 : par1;
  assign cur2 = sof(s2_tag) ? ~par2 : par2;
  assign cur3 = sof(s3_tag) ? ~par3 : par3;

  // ---- coarse row memories -----------------------------------------------
  vec2_t mem2 [2 * SLOTS * W2];
  vec3_t mem3 [2 * SLOTS * W3];

  always_ff @(posedge clk) begin
    if (s2_tag.valid)
      mem2[{cur2, s2_tag.y[3:0]} * W2 + 32'(s2_tag.x)] <= v2;
    if (s3_tag.valid)
      mem3[{cur3, s3_tag.y[3:0]} * W3 + 32'(s3_tag.x)] <= v3;
  end

  // ---- fine delay line memory --------------------------------------------
  dent_t dmem [DELAY_ROWS * W1];
  logic [$clog2(DELAY_ROWS)-1:0] wrow;
  logic                          primed;
  int unsigned                   waddr;
  assign waddr = 32'(wrow) * W1 + 32'(s1_tag.x);

  tag_t  a_tag;
  dent_t a_ent;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wrow   <= '0;
      primed <= 1'b0;
      a_tag  <= '0;
    end else begin
      a_tag <= '0;
      if (s1_tag.valid) begin
        a_ent       <= dmem[waddr];
        a_tag.valid <= primed;
        a_tag.x     <= s1_tag.x;
        a_tag.y     <= dmem[waddr].y;
        if (32'(s1_tag.x) == W1 - 1) begin
          wrow <= (32'(wrow) == DELAY_ROWS - 1) ? '0 : wrow + 1'b1;
          if (32'(wrow) == DELAY_ROWS - 1) primed <= 1'b1;
        end
      end
    end
    if (s1_tag.valid)
      dmem[waddr] <= '{par: cur1, y: s1_tag.y, v: v1};
  end

  // ---- read coarse scales and interpolate ----------------------------------
  function automatic int unsigned coarse_idx(input int unsigned p, input int unsigned sh, input int unsigned lim);
    int unsigned q;
    q = (p - LAG + (LAG << sh)) >> sh;
    return (q > lim - 1) ? lim - 1 : q;
  endfunction

  vec2_t m2;
  vec3_t m3;
  logic signed [S_W-1:0] sum [ND];

  always_comb begin
    int unsigned x2, y2, x3, y3, k, f;
    x2 = coarse_idx(32'(a_tag.x), 1, W2);
    y2 = coarse_idx(32'(a_ent.y), 1, H2);
    x3 = coarse_idx(32'(a_tag.x), 2, W3);
    y3 = coarse_idx(32'(a_ent.y), 2, H3);
    m2 = mem2[{a_ent.par, 4'(y2)} * W2 + x2];
    m3 = mem3[{a_ent.par, 4'(y3)} * W3 + x3];
    for (int d = 0; d < ND; d++) begin
      int a, b, i2, i3;
      // scale 2 at d/2
      k  = 32'(d) >> 1;
      a  = int'(signed'(m2[k]));
      b  = int'(signed'(m2[(k + 1 < ND2) ? k + 1 : k]));
      i2 = (d % 2 == 0) ? a : (a + b) >>> 1;
      // scale 3 at d/4
      k  = 32'(d) >> 2;
      f  = 32'(d) % 4;
      a  = int'(signed'(m3[k]));
      b  = int'(signed'(m3[(k + 1 < ND3) ? k + 1 : k]));
      i3 = a + ((b - a) * int'(f)) / 4;
      sum[d] = S_W'(int'(signed'(a_ent.v[d])) + i2 + i3);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_tag <= '0;
    else        out_tag <= a_tag;
    s_out <= sum;
  end

  initial begin
    assert ((ND - 1) % 4 == 0) else $error("interp_unit: ND-1 must be a multiple of 4");
  end

endmodule
