// tb_pe_linear_array: checks the linear PE array in both of its uses.
// Array A (DEPTH 1, X array) filters a sample stream restarted by `first`
// every SEG samples: y(t) = sum_k c[k] x(t-k) within the segment.
// Array B (DEPTH = 6, Y array) receives a 6-column raster; every column is
// filtered down the rows, restarted at row 0. Both outputs must appear one
// clock after the input.
module tb_pe_linear_array;
  localparam int N = 5, SEG = 11, COLS = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [7:0]  coef [N];
  logic               va, fa, vb, fb, ova, ovb;
  logic [2:0]         ab;
  logic signed [9:0]  xa, xb;
  logic signed [23:0] ya, yb;

  pe_linear_array #(.N(N), .IN_W(10), .COEF_W(8), .ACC_W(24), .DEPTH(1)) u_a (
    .clk, .rst_n, .in_valid(va), .first(fa), .addr(1'b0), .coef, .x(xa), .out_valid(ova), .y(ya));
  pe_linear_array #(.N(N), .IN_W(10), .COEF_W(8), .ACC_W(24), .DEPTH(COLS)) u_b (
    .clk, .rst_n, .in_valid(vb), .first(fb), .addr(ab), .coef, .x(xb), .out_valid(ovb), .y(yb));

  int checks = 0, failures = 0;
  int hist_a [$];
  int img [40][COLS];

  initial begin
    va = 0; vb = 0; fa = 0; fb = 0; ab = 0; xa = 0; xb = 0;
    for (int k = 0; k < N; k++) coef[k] = 8'($signed($urandom_range(0, 255)) - 128);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // X array: 5 segments
    for (int t = 0; t < 5 * SEG; t++) begin
      int e;
      @(negedge clk);
      va = 1; fa = (t % SEG == 0);
      xa = 10'($signed($urandom_range(0, 1023)) - 512);
      if (fa) hist_a.delete();
      hist_a.push_front(int'(xa));
      e = 0;
      for (int k = 0; k < N && k < hist_a.size(); k++) e += int'(coef[k]) * hist_a[k];
      @(posedge clk); #1;
      checks++;
      if (!ova || int'(ya) != e) begin failures++; $display("FAIL X t=%0d %0d vs %0d", t, ya, e); end
      if (t % 7 == 3) begin @(negedge clk); va = 0; @(posedge clk); #1; checks++; if (ova) failures++; end
    end
    @(negedge clk); va = 0;
    // Y array: 2 frames of 12 rows
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < 12; r++)
        for (int c = 0; c < COLS; c++) begin
          int e;
          @(negedge clk);
          vb = 1; fb = (r == 0); ab = 3'(c);
          xb = 10'($signed($urandom_range(0, 1023)) - 512);
          img[r][c] = int'(xb);
          e = 0;
          for (int k = 0; k < N && k <= r; k++) e += int'(coef[k]) * img[r-k][c];
          @(posedge clk); #1;
          checks++;
          if (!ovb || int'(yb) != e) begin failures++; $display("FAIL Y r=%0d c=%0d %0d vs %0d", r, c, yb, e); end
        end
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
