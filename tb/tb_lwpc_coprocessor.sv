// tb_lwpc_coprocessor: end-to-end test of the stereo coprocessor.
//
// Feeds NF frames of a synthetic stereo pair: a smoothed random texture for
// the left image and the same texture shifted left by a known disparity for
// the right image (right(x) = left(x + d)), a different disparity per frame
// (one of them half-way between pixels, made by averaging two neighbours),
// then blank lines to flush the pipeline. Every output pixel whose window
// lies inside the valid region must report the known disparity to within
// TOL/8 pixel on at least MIN_PCT percent of the pixels of each frame.
// The test also counts the mechanisms the design relies on (coarse scales
// active, candidates disabled at the line start, the line delay wrapping,
// sub-pixel refinement, output rows spilling into the next frame) and fails
// if any of them never happened. With the input running without gaps every
// disparity must leave exactly 16 lines + 13 clocks after the pixel at the
// bottom-right corner of its 7x7 filter window entered.
module tb_lwpc_coprocessor;
  import lwpc_pkg::*;

  localparam int unsigned W  = 64;
  localparam int unsigned H  = 40;
  localparam int unsigned MD = 12;
  localparam int unsigned NF = 3;
  localparam int          DISP8 [NF] = '{40, 72, 52};  // disparities x 8: 5, 9, 6.5
  localparam int unsigned TOL = 4;       // 1/2 pixel
  localparam int unsigned MIN_PCT = 90;
  localparam int unsigned LAG = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid;
  logic [7:0]        left_pix, right_pix;
  logic              disp_valid;
  logic [XW-1:0]     disp_x;
  logic [YW-1:0]     disp_y;
  logic [DISP_W-1:0] disparity;

  lwpc_coprocessor #(.IMG_W_P(W), .IMG_H_P(H), .MAX_DISP_P(MD)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // texture: random values smoothed with a 3x3 box, wider than the image
  localparam int unsigned TW = W + 32;
  int tex [H][TW];
  initial begin
    int raw [H][TW];
    for (int y = 0; y < H; y++) for (int x = 0; x < TW; x++) raw[y][x] = $urandom_range(0, 255);
    for (int y = 0; y < H; y++) for (int x = 0; x < TW; x++) begin
      int s, n;
      s = 0; n = 0;
      for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++)
        if (y+dy >= 0 && y+dy < H && x+dx >= 0 && x+dx < TW) begin s += raw[y+dy][x+dx]; n++; end
      tex[y][x] = s / n;
    end
  end

  // ---- output collection --------------------------------------------------
  int frame_o = 0, last_y = 0;
  int good [NF], total [NF];
  int n_frac = 0, n_spill = 0, n_out [NF];
  int in_frame = 0;
  int tin [NF + 1][H][W];
  int n_lat_bad = 0;
  localparam int LATENCY = 16 * W + 13;
  bit feeding_done = 0;
  always @(negedge clk) begin
    if (disp_valid) begin
      int x, y, e;
      x = int'(disp_x);
      y = int'(disp_y);
      if (y < last_y) frame_o++;
      last_y = y;
      if (frame_o < NF) begin
        // interior: right partner inside the line, all windows inside the image
        n_out[frame_o]++;
        if (cyc - tin[frame_o][y + LAG][x + LAG] != LATENCY) n_lat_bad++;
        if (in_frame > frame_o) n_spill++;
        if (x >= DISP8[frame_o] / 8 + 8 && y >= 8 && y < H - LAG - 8 && x < W - LAG - 8) begin
          e = int'(disparity) - DISP8[frame_o];
          total[frame_o]++;
          if (e <= int'(TOL) && e >= -int'(TOL)) good[frame_o]++;
        end
        if (disparity[2:0] != 3'b000) n_frac++;
      end
    end
  end

  // ---- mechanism counters --------------------------------------------------
  int n_s2 = 0, n_s3 = 0, n_dis = 0, n_wrap = 0;
  always @(negedge clk) begin
    if (dut.g_scale[1].u_g2h2_l.in_tag.valid) n_s2++;
    if (dut.g_scale[2].u_g2h2_l.in_tag.valid) n_s3++;
    if (dut.g_scale[0].g_orient[0].u_pc.n_tag.valid && int'(dut.g_scale[0].g_orient[0].u_pc.n_tag.x) < int'(MD)) n_dis++;
    if (dut.u_interp.s1_tag.valid && dut.u_interp.wrow == 0 && dut.u_interp.s1_tag.x == 0 && dut.u_interp.primed) n_wrap++;
  end

  task automatic feed(input int f, input bit blank);
    int di, r;
    di = DISP8[f] / 8;
    in_frame = blank ? NF : f;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        r = (DISP8[f] % 8 == 0) ? tex[y][x + di] : (tex[y][x + di] + tex[y][x + di + 1] + 1) / 2;
        in_valid  = 1'b1;
        tin[blank ? NF : f][y][x] = cyc;
        left_pix  = blank ? 8'd0 : 8'(tex[y][x]);
        right_pix = blank ? 8'd0 : 8'(r);
      end
  endtask

  initial begin
    in_valid = 0; left_pix = 0; right_pix = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++) feed(f, 1'b0);
    feed(0, 1'b1);                       // flush frame of blank lines
    @(negedge clk) in_valid = 0;
    repeat (50) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      checks++;
      $display("frame %0d disparity %0d/8: %0d of %0d interior pixels within %0d/8, %0d outputs",
               f, DISP8[f], good[f], total[f], TOL, n_out[f]);
      if (total[f] == 0 || good[f] * 100 < total[f] * int'(MIN_PCT)) failures++;
      checks++;
      if (n_out[f] != (W - LAG) * (H - LAG)) begin failures++; $display("FAIL output count"); end
    end
    $display("mechanisms: scale2 px %0d, scale3 px %0d, disabled candidates %0d, delay wraps %0d, sub-pixel results %0d, spilled rows' pixels %0d",
             n_s2, n_s3, n_dis, n_wrap, n_frac, n_spill);
    checks += 7;
    if (n_lat_bad != 0) begin failures++; $display("FAIL %0d outputs off the expected latency %0d", n_lat_bad, LATENCY); end
    if (n_spill == 0) failures++;
    if (n_s2 != (NF + 1) * (W/2) * (H/2)) begin failures++; $display("FAIL scale2 count"); end
    if (n_s3 != (NF + 1) * (W/4) * (H/4)) begin failures++; $display("FAIL scale3 count"); end
    if (n_dis == 0)  failures++;
    if (n_wrap == 0) failures++;
    if (n_frac == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NF + 2) * W * H + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
