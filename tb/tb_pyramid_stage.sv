// tb_pyramid_stage: feeds a random 16 x 12 image and checks the half-size
// output: every kept pixel (odd column and row of the input) must equal the
// causal 3x3 [1 2 1] x [1 2 1] / 16 low-pass value, rounded, and land at
// coordinates (x/2, y/2); exactly 8 x 6 pixels must come out.
module tb_pyramid_stage;
  import lwpc_pkg::*;
  localparam int W = 16, H = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  tag_t       in_tag, out_tag;
  logic [7:0] in_pix, out_pix;

  pyramid_stage #(.IN_W(W)) dut (.*);

  int checks = 0, failures = 0, nout = 0;
  int img [H][W];
  localparam int G [3] = '{1, 2, 1};

  always @(negedge clk) if (rst_n && out_tag.valid) begin
    int r, c, acc;
    r = 2 * int'(out_tag.y) + 1; c = 2 * int'(out_tag.x) + 1;
    acc = 0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      if (r - i >= 0 && c - j >= 0) acc += G[i] * G[j] * img[r-i][c-j];
    acc = (acc + 8) >>> 4;
    checks++; nout++;
    if (int'(out_pix) != acc) begin failures++; $display("FAIL (%0d,%0d) %0d vs %0d", out_tag.x, out_tag.y, out_pix, acc); end
  end

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
      end
    @(negedge clk) in_tag.valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nout != (W / 2) * (H / 2)) begin failures++; $display("FAIL count %0d", nout); end
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
