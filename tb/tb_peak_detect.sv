// tb_peak_detect: random vote vectors, some with a planted peak, some with
// the peak at an end of the range or a flat top. Reference: first index of
// the maximum; offset = (S(t+1) - S(t-1)) / (2 (2 S(t) - S(t-1) - S(t+1)))
// in floating point, times 8, rounded half away from zero and clamped to
// +-4; 0 at the ends or for a flat top; disparity = 8 t + offset.
module tb_peak_detect;
  import lwpc_pkg::*;
  localparam int ND = 21;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  tag_t               in_tag, out_tag;
  logic signed [19:0] s [ND];
  logic [7:0]         disparity;
  logic [4:0]         peak_int;
  logic signed [3:0]  peak_frac;

  peak_detect #(.ND(ND)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    in_tag = '0;
    for (int d = 0; d < ND; d++) s[d] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      int t, best, off, e;
      real q;
      @(negedge clk);
      for (int d = 0; d < ND; d++) s[d] = 20'($signed($urandom_range(0, 200000)) - 100000);
      case (i % 5)
        0: begin t = $urandom_range(1, ND - 2); s[t] = 20'sd300000; s[t-1] = 20'(250000 + $urandom_range(0, 49999)); s[t+1] = 20'(250000 + $urandom_range(0, 49999)); end
        1: s[0] = 20'sd400000;
        2: s[ND-1] = 20'sd400000;
        3: begin t = $urandom_range(1, ND - 2); s[t-1] = 20'sd350000; s[t] = 20'sd350000; s[t+1] = 20'sd350000; end
        default: ;
      endcase
      in_tag = '{valid: 1'b1, x: XW'(i), y: '0};
      t = 0; best = int'(s[0]);
      for (int d = 1; d < ND; d++) if (int'(s[d]) > best) begin best = int'(s[d]); t = d; end
      off = 0;
      if (t != 0 && t != ND - 1 && (2 * best - int'(s[t-1]) - int'(s[t+1])) != 0) begin
        q = 8.0 * real'(int'(s[t+1]) - int'(s[t-1])) / (2.0 * real'(2 * best - int'(s[t-1]) - int'(s[t+1])));
        off = (q >= 0) ? int'($floor(q + 0.5)) : -int'($floor(-q + 0.5));
        if (off > 4) off = 4;
        if (off < -4) off = -4;
      end
      e = 8 * t + off;
      @(posedge clk); #1;
      checks += 2;
      if (int'(disparity) != e) begin failures++; $display("FAIL case %0d: %0d vs %0d (t=%0d)", i % 5, disparity, e, t); end
      if (!out_tag.valid || int'(out_tag.x) != (i % 512)) failures++;
    end
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
