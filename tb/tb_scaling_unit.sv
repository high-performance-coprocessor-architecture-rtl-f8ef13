// tb_scaling_unit: feeds a random 32 x 16 image and checks all three
// pyramid levels: scale 1 equals the input (1 clock later), scale 2 is the
// low-passed, 2x down-sampled input (16 x 8 pixels) and scale 3 the same
// operation on scale 2 (8 x 4 pixels). The reference applies the causal
// [1 2 1] x [1 2 1] / 16 filter and keeps the odd rows and columns.
module tb_scaling_unit;
  import lwpc_pkg::*;
  localparam int W = 32, H = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  tag_t       in_tag;
  logic [7:0] in_pix;
  tag_t       s_tag [NUM_SCALES];
  logic [7:0] s_pix [NUM_SCALES];

  scaling_unit #(.IMG_W_P(W)) dut (.*);

  int checks = 0, failures = 0;
  int cnt [3];
  int l1 [H][W];
  int l2 [H/2][W/2];
  int l3 [H/4][W/4];
  localparam int G [3] = '{1, 2, 1};

  function automatic int lp(input int r, input int c, input int lvl);
    int acc = 0;
    acc = 0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      if (r - i >= 0 && c - j >= 0) acc += G[i] * G[j] * ((lvl == 1) ? l1[r-i][c-j] : l2[r-i][c-j]);
    return (acc + 8) >>> 4;
  endfunction

  always @(negedge clk) if (rst_n) for (int s = 0; s < 3; s++) if (s_tag[s].valid) begin
    int e, x, y;
    x = int'(s_tag[s].x); y = int'(s_tag[s].y);
    e = (s == 0) ? l1[y][x] : (s == 1) ? l2[y][x] : l3[y][x];
    cnt[s]++; checks++;
    if (int'(s_pix[s]) != e) begin failures++; $display("FAIL scale %0d (%0d,%0d) %0d vs %0d", s + 1, x, y, s_pix[s], e); end
  end

  initial begin
    in_tag = '0; in_pix = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) l1[r][c] = $urandom_range(0, 255);
    for (int r = 0; r < H/2; r++) for (int c = 0; c < W/2; c++) l2[r][c] = lp(2*r+1, 2*c+1, 1);
    for (int r = 0; r < H/4; r++) for (int c = 0; c < W/4; c++) l3[r][c] = lp(2*r+1, 2*c+1, 2);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        in_tag = '{valid: 1'b1, x: XW'(c), y: YW'(r)};
        in_pix = 8'(l1[r][c]);
      end
    @(negedge clk) in_tag.valid = 0;
    repeat (20) @(negedge clk);
    checks += 3;
    if (cnt[0] != W * H) failures++;
    if (cnt[1] != W * H / 4) failures++;
    if (cnt[2] != W * H / 16) failures++;
    $display("counts %0d %0d %0d", cnt[0], cnt[1], cnt[2]);
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
