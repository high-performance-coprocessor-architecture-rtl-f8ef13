// tb_interp_unit: feeds three 16 x 16 frames of random votes for all three
// scales, timed as the pyramid produces them (scale 2 with the odd fine
// pixels, scale 3 with every fourth), and checks every output of the first
// two frames. Reference for output pixel (x, y), disparity d:
//   S = sum_o c1[o](x,y,d) + I2 + I3, with the coarse votes read at
//   x_s = min((x - 4 + 4*2^(s-1)) >> (s-1), W_s - 1) (rows likewise),
//   I2 = V2(d/2) for even d, else the mean of V2 at (d-1)/2 and (d+1)/2,
//   I3 = V3(k) + (V3(k+1) - V3(k)) * (d mod 4) / 4, k = d/4,
// where V is the sum over orientations. Also checks that every pixel of
// the two frames comes out exactly once, in order, 16 lines after it went in.
module tb_interp_unit;
  import lwpc_pkg::*;
  localparam int W = 16, H = 16, ND = 9, ND2 = 5, ND3 = 3, NF = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  tag_t               s1_tag, s2_tag, s3_tag, out_tag;
  logic signed [15:0] c1 [3][ND];
  logic signed [15:0] c2 [3][ND2];
  logic signed [15:0] c3 [3][ND3];
  logic signed [19:0] s_out [ND];

  interp_unit #(.W1(W), .H1(H), .ND(ND)) dut (.*);

  int checks = 0, failures = 0, nout = 0;
  int v1 [NF][H][W][ND];
  int v2 [NF][H/2][W/2][ND2];
  int v3 [NF][H/4][W/4][ND3];

  function automatic int cidx(input int p, input int sh, input int lim);
    int q;
    q = (p - 4 + (4 << sh)) >>> sh;
    return (q > lim - 1) ? lim - 1 : q;
  endfunction

  int fo = 0, exp_x = 0, exp_y = 0;
  always @(negedge clk) if (rst_n && out_tag.valid && fo < NF - 1) begin
    int x, y, x2, y2, x3, y3;
    x = int'(out_tag.x); y = int'(out_tag.y);
    checks++;
    if (x != exp_x || y != exp_y) begin failures++; $display("FAIL order (%0d,%0d) expected (%0d,%0d)", x, y, exp_x, exp_y); end
    x2 = cidx(x, 1, W/2); y2 = cidx(y, 1, H/2);
    x3 = cidx(x, 2, W/4); y3 = cidx(y, 2, H/4);
    for (int d = 0; d < ND; d++) begin
      int i2, i3, k, e;
      k = d / 2;
      i2 = (d % 2 == 0) ? v2[fo][y2][x2][k] : (v2[fo][y2][x2][k] + v2[fo][y2][x2][k+1]) >>> 1;
      k = d / 4;
      i3 = (d % 4 == 0) ? v3[fo][y3][x3][k] : v3[fo][y3][x3][k] + ((v3[fo][y3][x3][k+1] - v3[fo][y3][x3][k]) * (d % 4)) / 4;
      e = v1[fo][y][x][d] + i2 + i3;
      checks++;
      if (int'(s_out[d]) != e) begin failures++; $display("FAIL f%0d (%0d,%0d) d%0d %0d vs %0d", fo, x, y, d, s_out[d], e); end
    end
    nout++;
    exp_x = (x + 1) % W;
    if (exp_x == 0) begin exp_y = (y + 1) % H; if (exp_y == 0) fo++; end
  end

  initial begin
    s1_tag = '0; s2_tag = '0; s3_tag = '0;
    for (int o = 0; o < 3; o++) begin
      for (int d = 0; d < ND; d++) c1[o][d] = 0;
      for (int d = 0; d < ND2; d++) c2[o][d] = 0;
      for (int d = 0; d < ND3; d++) c3[o][d] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          s1_tag = '{valid: 1'b1, x: XW'(x), y: YW'(y)};
          for (int d = 0; d < ND; d++) begin
            v1[f][y][x][d] = 0;
            for (int o = 0; o < 3; o++) begin
              c1[o][d] = 16'($signed($urandom_range(0, 65535)) - 32768);
              v1[f][y][x][d] += int'(c1[o][d]);
            end
          end
          s2_tag = '0;
          if (x % 2 == 1 && y % 2 == 1) begin
            s2_tag = '{valid: 1'b1, x: XW'(x / 2), y: YW'(y / 2)};
            for (int d = 0; d < ND2; d++) begin
              v2[f][y/2][x/2][d] = 0;
              for (int o = 0; o < 3; o++) begin
                c2[o][d] = 16'($signed($urandom_range(0, 65535)) - 32768);
                v2[f][y/2][x/2][d] += int'(c2[o][d]);
              end
            end
          end
          s3_tag = '0;
          if (x % 4 == 3 && y % 4 == 3) begin
            s3_tag = '{valid: 1'b1, x: XW'(x / 4), y: YW'(y / 4)};
            for (int d = 0; d < ND3; d++) begin
              v3[f][y/4][x/4][d] = 0;
              for (int o = 0; o < 3; o++) begin
                c3[o][d] = 16'($signed($urandom_range(0, 65535)) - 32768);
                v3[f][y/4][x/4][d] += int'(c3[o][d]);
              end
            end
          end
        end
    @(negedge clk) begin s1_tag = '0; s2_tag = '0; s3_tag = '0; end
    repeat (10) @(negedge clk);
    checks++;
    if (nout != (NF - 1) * W * H) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * W * H + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
