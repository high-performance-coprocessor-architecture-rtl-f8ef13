// tb_sep_filter2d: filters two random 16 x 10 frames with a random separable
// 7 x 7 kernel and compares every output pixel with a direct 2-D causal
// convolution (zero outside the frame, rounded right shift, saturation),
// and checks the 3-clock latency. Input pauses are inserted at random.
module tb_sep_filter2d;
  import lwpc_pkg::*;
  localparam int N = 7, W = 16, H = 10, SH = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [7:0]  cx [N], cy [N];
  tag_t               in_tag, out_tag;
  logic signed [8:0]  in_data;
  logic signed [15:0] out_data;

  sep_filter2d #(.N(N), .LINE_W(W), .IN_W(9), .COEF_W(8), .XACC_W(19), .YACC_W(30), .OUT_W(16), .SHIFT(SH)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int img [2][H][W];
  int tin [2][H][W];
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int ref_px(int f, int r, int c);
    longint acc = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      if (r - i >= 0 && c - j >= 0) acc += longint'(cy[i]) * longint'(cx[j]) * img[f][r-i][c-j];
    acc = (acc + (64'sd1 <<< (SH - 1))) >>> SH;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  int fo = 0;
  always @(negedge clk) if (rst_n && out_tag.valid) begin
    int r, c, e;
    r = int'(out_tag.y); c = int'(out_tag.x);
    e = ref_px(fo, r, c);
    checks++; nout++;
    if (int'(out_data) != e) begin failures++; $display("FAIL (%0d,%0d) %0d vs %0d", r, c, out_data, e); end
    checks++;
    if (cyc - tin[fo][r][c] != 3) begin failures++; $display("FAIL latency %0d", cyc - tin[fo][r][c]); end
    if (r == H - 1 && c == W - 1) fo++;
  end

  initial begin
    in_tag = '0; in_data = 0;
    for (int k = 0; k < N; k++) begin
      cx[k] = 8'($signed($urandom_range(0, 255)) - 128);
      cy[k] = 8'($signed($urandom_range(0, 255)) - 128);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          while ($urandom_range(0, 5) == 0) begin in_tag.valid = 0; @(negedge clk); end
          img[f][r][c] = $urandom_range(0, 255);
          in_tag = '{valid: 1'b1, x: XW'(c), y: YW'(r)};
          in_data = 9'(img[f][r][c]);
          tin[f][r][c] = cyc;
        end
    @(negedge clk) in_tag.valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nout != 2 * W * H) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
