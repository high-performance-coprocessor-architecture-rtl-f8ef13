// tb_voting_func: drives random unit-phasor pairs (from random angles) over
// a 8 x 6 frame, with `en` low for some pixels, and checks every windowed
// vote against a reference: p = Re(L)Re(R) + Im(L)Im(R) (0 when disabled),
// then the causal 3x3 [1 2 1] x [1 2 1] window, rounded /16 and saturated.
// Also checks the 4-clock latency.
module tb_voting_func;
  import lwpc_pkg::*;
  localparam int W = 8, H = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  tag_t              in_tag, out_tag;
  logic              en;
  logic signed [8:0] l_re, l_im, r_re, r_im;
  logic signed [15:0] out_c;

  voting_func #(.LINE_W(W)) dut (.*);

  int checks = 0, failures = 0, nout = 0, cyc = 0;
  int p [H][W];
  int tin [H][W];
  always @(posedge clk) cyc <= cyc + 1;
  localparam int G [3] = '{1, 2, 1};

  always @(negedge clk) if (rst_n && out_tag.valid) begin
    int r, c, acc;
    r = int'(out_tag.y); c = int'(out_tag.x);
    acc = 0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      if (r - i >= 0 && c - j >= 0) acc += G[i] * G[j] * p[r-i][c-j];
    acc = (acc + 8) >>> 4;
    if (acc > 32767) acc = 32767;
    nout++; checks += 2;
    if (int'(out_c) != acc) begin failures++; $display("FAIL (%0d,%0d) %0d vs %0d", c, r, out_c, acc); end
    if (cyc - tin[r][c] != 4) begin failures++; $display("FAIL latency"); end
  end

  initial begin
    in_tag = '0; en = 0; l_re = 0; l_im = 0; r_re = 0; r_im = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        real a, b;
        @(negedge clk);
        a = $urandom_range(0, 6283) / 1000.0;
        b = (c % 3 == 0) ? a : $urandom_range(0, 6283) / 1000.0;
        l_re = 9'($rtoi(128.0 * $cos(a))); l_im = 9'($rtoi(128.0 * $sin(a)));
        r_re = 9'($rtoi(128.0 * $cos(b))); r_im = 9'($rtoi(128.0 * $sin(b)));
        en = ($urandom_range(0, 4) != 0);
        p[r][c] = en ? int'(l_re) * int'(r_re) + int'(l_im) * int'(r_im) : 0;
        in_tag = '{valid: 1'b1, x: XW'(c), y: YW'(r)};
        tin[r][c] = cyc;
      end
    @(negedge clk) in_tag.valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nout != W * H) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
