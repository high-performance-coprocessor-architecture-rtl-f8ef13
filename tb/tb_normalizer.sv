// tb_normalizer: random complex inputs, from tiny to full scale, including
// zero. Reference: |O| = floor(sqrt(re^2 + im^2)) in floating point,
// outputs trunc(re * 128 / |O|) and trunc(im * 128 / |O|), 0 for |O| = 0.
// Also checks that every output lies in [-128, 128].
module tb_normalizer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] re, im;
  logic signed [8:0]  nre, nim;
  normalizer dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 600; i++) begin
      longint m2;
      int mag, ere, eim, range_sel;
      @(negedge clk);
      range_sel = i % 4;
      case (range_sel)
        0: begin re = 16'($signed($urandom_range(0, 65535)) - 32768); im = 16'($signed($urandom_range(0, 65535)) - 32768); end
        1: begin re = 16'($signed($urandom_range(0, 20)) - 10); im = 16'($signed($urandom_range(0, 20)) - 10); end
        2: begin re = 16'($signed($urandom_range(0, 600)) - 300); im = 16'($signed($urandom_range(0, 600)) - 300); end
        default: begin re = (i % 8 == 3) ? 16'sd0 : -16'sd32768; im = (i % 8 == 3) ? 16'sd0 : 16'sd5; end
      endcase
      m2 = longint'(re) * re + longint'(im) * im;
      mag = int'($floor($sqrt(real'(m2))));
      if (longint'(mag) * mag > m2) mag--;
      if ((longint'(mag) + 1) * (longint'(mag) + 1) <= m2) mag++;
      ere = (mag == 0) ? 0 : (int'(re) * 128) / mag;
      eim = (mag == 0) ? 0 : (int'(im) * 128) / mag;
      @(posedge clk); #1;
      checks += 3;
      if (int'(nre) != ere) begin failures++; $display("FAIL re %0d im %0d -> %0d vs %0d", re, im, nre, ere); end
      if (int'(nim) != eim) begin failures++; $display("FAIL re %0d im %0d -> im %0d vs %0d", re, im, nim, eim); end
      if (nre > 128 || nre < -128 || nim > 128 || nim < -128) failures++;
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
