// tb_lwpc_scene: the stereo coprocessor on a layered scene of 256 x 232
// pixels (the size of a common outdoor test pair, cropped to a multiple of 4
// rows), with the default 20-pixel range.
//
// The scene has three fronto-parallel layers, each with its own smoothed
// random texture: a background at disparity 3, a tall "trunk" at 9.5 (a
// half-pixel shift, made by averaging two neighbours) and a foreground
// block at 16. Nearer layers hide farther ones. The right image is rendered
// from the layers: right pixel x shows the nearest layer whose shifted
// outline covers it, so it has true occlusions and depth edges. The test
// then feeds one blank frame to flush the last lines.
//
// Checks:
// * Inside each layer, away from its edges, at least MIN_PCT percent of
//   the pixels must be within 1/2 pixel of the layer's disparity. A pixel
//   is away from an edge when every left pixel from 24 columns before it to
//   8 after it, and from 8 rows above to 8 below, lies in the same layer.
// * Every pixel of the valid region (W-4) x (H-4) comes out exactly once.
// * Every result comes out 16 lines + 13 clocks after its window's last
//   pixel.
// The accuracy over all pixels, edges included, is printed for information.
module tb_lwpc_scene;
  import lwpc_pkg::*;

  localparam int unsigned W   = 256;
  localparam int unsigned H   = 232;
  localparam int unsigned NL  = 3;
  localparam int          LD8 [NL] = '{24, 76, 128};   // layer disparities x 8
  localparam int          LX0 [NL] = '{0,  60,  170};  // layer outlines, left image
  localparam int          LX1 [NL] = '{W,  140, 236};
  localparam int          LY0 [NL] = '{0,  20,  100};
  localparam int          LY1 [NL] = '{H,  200, 210};
  localparam int unsigned TOL = 4;       // 1/2 pixel
  localparam int unsigned MIN_PCT = 85;
  localparam int unsigned LAG = 4;
  localparam int unsigned TW = W + 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid;
  logic [7:0]        left_pix, right_pix;
  logic              disp_valid;
  logic [XW-1:0]     disp_x;
  logic [YW-1:0]     disp_y;
  logic [DISP_W-1:0] disparity;

  lwpc_coprocessor #(.IMG_W_P(W), .IMG_H_P(H)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int tex [NL][H][TW];
  int lay [H][W];        // nearest layer at each left pixel
  int limg [H][W], rimg [H][W];

  // nearest layer covering pixel (x, y) of the left image, or of the right
  // image when `right` is set (there each outline moves left by the whole
  // part of its layer's disparity)
  function automatic int top_layer(int x, int y, bit right);
    int k;
    k = 0;
    for (int l = 1; l < NL; l++) begin
      int a, b;
      a = LX0[l] - (right ? LD8[l] / 8 : 0);
      b = LX1[l] - (right ? LD8[l] / 8 : 0);
      if (x >= a && x < b && y >= LY0[l] && y < LY1[l]) k = l;
    end
    return k;
  endfunction

  initial begin
    int raw [H][TW];
    for (int l = 0; l < NL; l++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < TW; x++) raw[y][x] = $urandom_range(0, 255);
      for (int y = 0; y < H; y++) for (int x = 0; x < TW; x++) begin
        int s, n;
        s = 0; n = 0;
        for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++)
          if (y+dy >= 0 && y+dy < H && x+dx >= 0 && x+dx < TW) begin s += raw[y+dy][x+dx]; n++; end
        tex[l][y][x] = s / n;
      end
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int k, di;
      k = top_layer(x, y, 1'b0);
      lay[y][x]  = k;
      limg[y][x] = tex[k][y][x];
      k = top_layer(x, y, 1'b1);
      di = LD8[k] / 8;
      rimg[y][x] = (LD8[k] % 8 == 0) ? tex[k][y][x + di]
                                     : (tex[k][y][x + di] + tex[k][y][x + di + 1] + 1) / 2;
    end
  end

  // a pixel is inside its layer when the region the matcher looks at is
  function automatic bit in_layer(int x, int y);
    int k;
    k = lay[y][x];
    if (x < 24 || y < 8 || x + 8 >= int'(W) || y + 8 >= int'(H)) return 1'b0;
    for (int yy = y - 8; yy <= y + 8; yy++)
      for (int xx = x - 24; xx <= x + 8; xx++)
        if (lay[yy][xx] != k) return 1'b0;
    return 1'b1;
  endfunction

  // ---- output collection --------------------------------------------------
  int good [NL], total [NL];
  int all_good = 0, n_out = 0, n_lat_bad = 0, n_order_bad = 0;
  int tin [H][W];
  int exp_x = 0, exp_y = 0;
  bit frame_done = 0;
  localparam int LATENCY = 16 * W + 13;
  always @(negedge clk) begin
    if (disp_valid && !frame_done) begin
      int x, y, e, k;
      x = int'(disp_x);
      y = int'(disp_y);
      if (x != exp_x || y != exp_y) n_order_bad++;
      n_out++;
      if (cyc - tin[y + LAG][x + LAG] != LATENCY) n_lat_bad++;
      k = lay[y][x];
      e = int'(disparity) - LD8[k];
      if (e <= int'(TOL) && e >= -int'(TOL)) all_good++;
      if (in_layer(x, y)) begin
        total[k]++;
        if (e <= int'(TOL) && e >= -int'(TOL)) good[k]++;
      end
      if (x == int'(W - LAG) - 1) begin
        exp_x = 0;
        exp_y = y + 1;
        if (y == int'(H - LAG) - 1) frame_done = 1;
      end else exp_x = x + 1;
    end
  end

  task automatic feed(input bit blank);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        in_valid  = 1'b1;
        if (!blank) tin[y][x] = cyc;
        left_pix  = blank ? 8'd0 : 8'(limg[y][x]);
        right_pix = blank ? 8'd0 : 8'(rimg[y][x]);
      end
  endtask

  initial begin
    in_valid = 0; left_pix = 0; right_pix = 0;
    for (int l = 0; l < NL; l++) begin good[l] = 0; total[l] = 0; end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    feed(1'b0);
    feed(1'b1);                          // blank frame flushes the last lines
    @(negedge clk) in_valid = 0;
    repeat (50) @(negedge clk);
    for (int l = 0; l < NL; l++) begin
      checks++;
      $display("layer %0d disparity %0d/8: %0d of %0d pixels inside the layer within %0d/8",
               l, LD8[l], good[l], total[l], TOL);
      if (total[l] < 100 || good[l] * 100 < total[l] * int'(MIN_PCT)) begin
        failures++;
        $display("FAIL layer %0d", l);
      end
    end
    $display("all pixels, edges and occlusions included: %0d of %0d within %0d/8",
             all_good, n_out, TOL);
    checks += 3;
    if (n_out != int'((W - LAG) * (H - LAG))) begin failures++; $display("FAIL output count %0d", n_out); end
    if (n_order_bad != 0) begin failures++; $display("FAIL %0d outputs out of order", n_order_bad); end
    if (n_lat_bad != 0) begin failures++; $display("FAIL %0d outputs off the expected latency %0d", n_lat_bad, LATENCY); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * W * H + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
