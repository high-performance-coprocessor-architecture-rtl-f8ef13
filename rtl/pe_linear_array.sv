// pe_linear_array: linear array of N processing elements computing one 1-D
// FIR filter, y = sum_k coef[k] * x(t-k).
//
// The data word is broadcast to every PE; PE k multiplies it by coef[k] and
// adds the partial sum kept by PE k+1 (PE N-1 adds nothing), so PE 0 holds
// the finished sum. With DEPTH = 1 successive inputs are successive samples
// of a line (X array). With DEPTH = line width the PEs' register files are
// addressed by column, so successive inputs at the same column are successive
// rows and the array filters down the columns (Y array) while the data still
// arrives in raster order. `first` restarts the sum (zero padding) at the
// first sample of the filtered dimension.
//
// Timing: `out_valid`/`y` follow `in_valid` by one clock. One sample per clock.
module pe_linear_array #(
  parameter int unsigned N      = 7,
  parameter int unsigned IN_W   = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned ACC_W  = 20,
  parameter int unsigned DEPTH  = 1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     first,
  input  logic [AW-1:0]            addr,
  input  logic signed [COEF_W-1:0] coef [N],
  input  logic signed [IN_W-1:0]   x,
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  y
);

  logic signed [ACC_W-1:0] rd   [N];
  logic signed [ACC_W-1:0] yk   [N];
  logic signed [ACC_W-1:0] nb   [N];

  for (genvar k = 0; k < N; k++) begin : g_pe
    assign nb[k] = (k == N - 1) ? '0 : rd[(k == N - 1) ? k : k + 1];
    sep_pe #(.IN_W(IN_W), .COEF_W(COEF_W), .ACC_W(ACC_W), .DEPTH(DEPTH)) u_pe (
      .clk, .in_valid, .first, .addr, .x, .coef(coef[k]),
      .nb_sum(nb[k]), .rd_sum(rd[k]), .y(yk[k])
    );
  end

  assign y = yk[0];

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
