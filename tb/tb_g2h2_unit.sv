// tb_g2h2_unit: filters a random 16 x 12 image and checks, for every output
// pixel, the three complex responses against a floating-point reference:
// direct 2-D causal convolution with the seven separable basis kernels
// (products of the 1-D factors, divided by 64*64), then steering to 0, +45
// and -45 degrees with exact trigonometric gains. Also checks the 4-clock
// latency and the output count.
module tb_g2h2_unit;
  import lwpc_pkg::*;
  localparam int W = 16, H = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  tag_t               in_tag, out_tag;
  logic [7:0]         in_pix;
  logic signed [15:0] out_re [3], out_im [3];

  g2h2_unit #(.LINE_W(W)) dut (.*);

  int checks = 0, failures = 0, nout = 0, cyc = 0;
  int img [H][W];
  int tin [H][W];
  always @(posedge clk) cyc <= cyc + 1;
  localparam real PI = 3.14159265358979;

  function automatic real fac(input int which, input int k);
    case (which)
      0: return real'(F_G2R[k]);
      1: return real'(F_GS[k]);
      2: return real'(F_G2B[k]);
      3: return real'(F_H2A[k]);
      4: return real'(F_H2B[k]);
      default: return real'(F_H2O[k]);
    endcase
  endfunction

  // basis b: x factor / y factor
  localparam int FX [7] = '{0, 2, 1, 3, 4, 5, 1};
  localparam int FY [7] = '{1, 2, 0, 1, 5, 4, 3};

  function automatic real basis(input int b, input int r, input int c);
    real acc = 0.0;
    acc = 0.0;
    for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++)
      if (r - i >= 0 && c - j >= 0) acc += fac(FY[b], i) * fac(FX[b], j) * img[r-i][c-j];
    return acc / 4096.0;
  endfunction

  always @(negedge clk) if (rst_n && out_tag.valid) begin
    real b [7];
    int r, c;
    r = int'(out_tag.y); c = int'(out_tag.x);
    for (int k = 0; k < 7; k++) b[k] = basis(k, r, c);
    nout++;
    for (int o = 0; o < 3; o++) begin
      real t, cs, sn, eg, eh;
      t = (o == 0) ? 0.0 : (o == 1) ? PI / 4 : -PI / 4;
      cs = $cos(t); sn = $sin(t);
      eg = cs*cs*b[0] - 2*cs*sn*b[1] + sn*sn*b[2];
      eh = cs*cs*cs*b[3] - 3*cs*cs*sn*b[4] + 3*cs*sn*sn*b[5] - sn*sn*sn*b[6];
      checks += 2;
      if (fabs(out_re[o] - eg) > 3.0 + 0.005 * fabs(eg)) begin failures++; $display("FAIL re o%0d (%0d,%0d) %0d vs %f", o, c, r, out_re[o], eg); end
      if (fabs(out_im[o] - eh) > 3.0 + 0.005 * fabs(eh)) begin failures++; $display("FAIL im o%0d (%0d,%0d) %0d vs %f", o, c, r, out_im[o], eh); end
    end
    checks++;
    if (cyc - tin[r][c] != 4) begin failures++; $display("FAIL latency %0d", cyc - tin[r][c]); end
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    in_tag = '0; in_pix = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        img[r][c] = $urandom_range(0, 255);
        in_tag = '{valid: 1'b1, x: XW'(c), y: YW'(r)};
        in_pix = 8'(img[r][c]);
        tin[r][c] = cyc;
      end
    @(negedge clk) in_tag.valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nout != W * H) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
