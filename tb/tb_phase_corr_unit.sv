// tb_phase_corr_unit: drives random left/right complex responses over two
// 8 x 6 frames and checks all ND = 5 windowed votes of every pixel against
// a reference that normalises each response (floor square root, truncating
// division to Q1.7), pairs left pixel x with right pixel x-d of the same
// line (vote 0 when x < d), forms Re(L conj R) and applies the causal
// 3x3 [1 2 1] window. Also checks the 5-clock latency.
module tb_phase_corr_unit;
  import lwpc_pkg::*;
  localparam int W = 8, H = 6, ND = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  tag_t               in_tag, out_tag;
  logic signed [15:0] l_re, l_im, r_re, r_im;
  logic signed [15:0] c [ND];

  phase_corr_unit #(.ND(ND), .LINE_W(W)) dut (.*);

  int checks = 0, failures = 0, nout = 0, cyc = 0;
  int lr [2][H][W], li [2][H][W], rr [2][H][W], ri [2][H][W];
  int tin [2][H][W];
  always @(posedge clk) cyc <= cyc + 1;
  localparam int G [3] = '{1, 2, 1};

  function automatic void norm(input int re, input int im, output int nre, output int nim);
    longint m2;
    int mag;
    m2 = longint'(re) * re + longint'(im) * im;
    mag = int'($floor($sqrt(real'(m2))));
    if (longint'(mag) * mag > m2) mag--;
    if ((longint'(mag) + 1) * (longint'(mag) + 1) <= m2) mag++;
    nre = (mag == 0) ? 0 : (re * 128) / mag;
    nim = (mag == 0) ? 0 : (im * 128) / mag;
  endfunction

  function automatic int vote(input int f, input int r, input int c, input int d);
    int a, b, e, g;
    if (c < d) return 0;
    norm(lr[f][r][c], li[f][r][c], a, b);
    norm(rr[f][r][c-d], ri[f][r][c-d], e, g);
    return a * e + b * g;
  endfunction

  int fo = 0;
  always @(negedge clk) if (rst_n && out_tag.valid) begin
    int r, cc;
    r = int'(out_tag.y); cc = int'(out_tag.x);
    for (int d = 0; d < ND; d++) begin
      int acc;
      acc = 0;
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
        if (r - i >= 0 && cc - j >= 0) acc += G[i] * G[j] * vote(fo, r - i, cc - j, d);
      acc = (acc + 8) >>> 4;
      if (acc > 32767) acc = 32767;
      checks++;
      if (int'(c[d]) != acc) begin failures++; $display("FAIL (%0d,%0d) d%0d %0d vs %0d", cc, r, d, c[d], acc); end
    end
    checks++; nout++;
    if (cyc - tin[fo][r][cc] != 5) begin failures++; $display("FAIL latency"); end
    if (r == H - 1 && cc == W - 1) fo++;
  end

  initial begin
    in_tag = '0; l_re = 0; l_im = 0; r_re = 0; r_im = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < H; r++)
        for (int cc = 0; cc < W; cc++) begin
          @(negedge clk);
          lr[f][r][cc] = $urandom_range(0, 4000) - 2000; li[f][r][cc] = $urandom_range(0, 4000) - 2000;
          rr[f][r][cc] = $urandom_range(0, 4000) - 2000; ri[f][r][cc] = $urandom_range(0, 4000) - 2000;
          if (cc % 4 == 1) begin rr[f][r][cc] = 0; ri[f][r][cc] = 0; end
          l_re = 16'(lr[f][r][cc]); l_im = 16'(li[f][r][cc]);
          r_re = 16'(rr[f][r][cc]); r_im = 16'(ri[f][r][cc]);
          in_tag = '{valid: 1'b1, x: XW'(cc), y: YW'(r)};
          tin[f][r][cc] = cyc;
        end
    @(negedge clk) in_tag.valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nout != 2 * W * H) failures++;
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
