// sep_pe: one processing element of the pipelined linear filter arrays.
//
// The PE multiplies the broadcast data word by its own filter tap and adds
// the partial sum handed over by its neighbour further down the array; the
// multiplier result goes straight into the adder (multiply-accumulate in one
// cycle). The new partial sum is written into the PE's register file at
// address `addr` and is read there by the next PE up the array one step
// later. With DEPTH = 1 the register file is one register and the array
// is a transposed-form FIR along a line (the X array); with DEPTH = line
// width each entry holds the partial sum of one column (the Y array).
// When `first` is set the neighbour's partial sum is ignored, which zero-pads
// the filter at the start of a line or frame.
//
// Timing: `rd_sum` is the stored value at `addr` (combinational read, the
// value from before this cycle's write); `y` is the value written, one
// clock after `in_valid`.
module sep_pe #(
  parameter int unsigned IN_W   = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned ACC_W  = 20,
  parameter int unsigned DEPTH  = 1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                     clk,
  input  logic                     in_valid,
  input  logic                     first,
  input  logic [AW-1:0]            addr,
  input  logic signed [IN_W-1:0]   x,
  input  logic signed [COEF_W-1:0] coef,
  input  logic signed [ACC_W-1:0]  nb_sum,
  output logic signed [ACC_W-1:0]  rd_sum,
  output logic signed [ACC_W-1:0]  y
);

  logic signed [ACC_W-1:0] regfile [DEPTH];
  logic signed [ACC_W-1:0] prod, sum;

  always_comb begin
    prod = ACC_W'(x * coef);
    sum  = first ? prod : prod + nb_sum;
  end

  assign rd_sum = regfile[(DEPTH > 1) ? addr : '0];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      regfile[(DEPTH > 1) ? addr : '0] <= sum;
      y <= sum;
    end
  end

endmodule
