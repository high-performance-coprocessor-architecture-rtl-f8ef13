// tb_steer_sum: drives random basis responses and compares the steered
// outputs with the steering formulas evaluated in floating point:
//   G2(t) = cos^2 t Ga - 2 cos t sin t Gb + sin^2 t Gc
//   H2(t) = cos^3 t Ha - 3 cos^2 t sin t Hb + 3 cos t sin^2 t Hc - sin^3 t Hd
// for t = 0, +45, -45 degrees, allowing for the 8-bit fixed-point gains.
module tb_steer_sum;
  import lwpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] g [3], h [4], re [3], im [3];
  steer_sum dut (.*);

  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    for (int i = 0; i < 300; i++) begin
      real t, c, s, eg, eh;
      @(negedge clk);
      for (int k = 0; k < 3; k++) g[k] = 16'($signed($urandom_range(0, 8000)) - 4000);
      for (int k = 0; k < 4; k++) h[k] = 16'($signed($urandom_range(0, 8000)) - 4000);
      @(posedge clk); #1;
      for (int o = 0; o < 3; o++) begin
        t = (o == 0) ? 0.0 : (o == 1) ? PI / 4 : -PI / 4;
        c = $cos(t); s = $sin(t);
        eg = c*c*g[0] - 2*c*s*g[1] + s*s*g[2];
        eh = c*c*c*h[0] - 3*c*c*s*h[1] + 3*c*s*s*h[2] - s*s*s*h[3];
        checks += 2;
        // gains are rounded to 1/256: allow 0.2% of the summed magnitude + 2
        if (fabs(re[o] - eg) > 2.0 + 0.002 * (fabs(g[0]) + 2*fabs(g[1]) + fabs(g[2]))) begin
          failures++; $display("FAIL re[%0d] %0d vs %f", o, re[o], eg); end
        if (fabs(im[o] - eh) > 2.0 + 0.002 * (fabs(h[0]) + 3*fabs(h[1]) + 3*fabs(h[2]) + fabs(h[3]))) begin
          failures++; $display("FAIL im[%0d] %0d vs %f", o, im[o], eh); end
      end
    end
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
