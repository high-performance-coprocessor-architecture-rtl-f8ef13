// tb_sep_pe: checks one processing element with a 4-entry register file:
// the multiply-accumulate with the neighbour's partial sum, the `first`
// bypass, the write into the addressed entry, the combinational read-back
// and that nothing changes while in_valid is low.
module tb_sep_pe;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, first;
  logic [1:0]        addr;
  logic signed [8:0] x;
  logic signed [7:0] coef;
  logic signed [19:0] nb_sum, rd_sum, y;

  sep_pe #(.IN_W(9), .COEF_W(8), .ACC_W(20), .DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  int model [4];
  bit known [4];

  initial begin
    in_valid = 0; first = 0; addr = 0; x = 0; coef = 0; nb_sum = 0;
    for (int i = 0; i < 400; i++) begin
      int exp_v;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      first    = ($urandom_range(0, 4) == 0);
      addr     = 2'($urandom_range(0, 3));
      x        = 9'($signed($urandom_range(0, 511)) - 256);
      coef     = 8'($signed($urandom_range(0, 255)) - 128);
      nb_sum   = 20'($signed($urandom_range(0, 200000)) - 100000);
      exp_v    = int'(x) * int'(coef) + (first ? 0 : int'(nb_sum));
      #1;
      if (known[addr]) begin
        checks++;
        if (int'(rd_sum) != model[addr]) begin failures++; $display("FAIL rd_sum addr %0d: %0d vs %0d", addr, rd_sum, model[addr]); end
      end
      @(posedge clk); #1;
      if (in_valid) begin
        model[addr] = exp_v;
        known[addr] = 1;
        checks++;
        if (int'(y) != exp_v) begin failures++; $display("FAIL y %0d vs %0d", y, exp_v); end
      end
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
