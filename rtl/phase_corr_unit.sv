// phase_corr_unit: phase correlation of one orientation at one scale over
// all disparity candidates 0..ND-1.
//
// The left and right complex filter responses are normalised to unit
// phasors. The right phasor then runs through a chain of ND-1 one-pixel
// delays, so tap d holds the right response of pixel x-d of the same line
// while the left response of pixel x is broadcast to all ND voting
// functions. voting_func d produces the windowed vote C(x, d). Candidates
// with x < d have no partner on the line and vote 0.
//
// The delay chain with one voting function per candidate follows the
// published architecture. Normalising once per input stream, before the
// delay chain, is this design's choice (it equals normalising inside every
// voting function). Timing: 5 clocks from in_tag to out_tag.
module phase_corr_unit
  import lwpc_pkg::*;
#(
  parameter int unsigned ND     = MAX_DISP + 1,
  parameter int unsigned LINE_W = IMG_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  tag_t                  in_tag,
  input  logic signed [O_W-1:0] l_re,
  input  logic signed [O_W-1:0] l_im,
  input  logic signed [O_W-1:0] r_re,
  input  logic signed [O_W-1:0] r_im,
  output tag_t                  out_tag,
  output logic signed [C_W-1:0] c [ND]
);

  tag_t                   n_tag;
  logic signed [PH_W-1:0] nl_re, nl_im, nr_re, nr_im;
  logic signed [PH_W-1:0] d_re [ND];
  logic signed [PH_W-1:0] d_im [ND];
  tag_t                   v_tag [ND];

  normalizer u_norm_l (.clk, .re(l_re), .im(l_im), .nre(nl_re), .nim(nl_im));
  normalizer u_norm_r (.clk, .re(r_re), .im(r_im), .nre(nr_re), .nim(nr_im));

  always_ff @(posedge clk) begin
    if (!rst_n) n_tag <= '0;
    else        n_tag <= in_tag;
  end

  // z^-1 chain on the right phasor, advanced once per valid pixel
  assign d_re[0] = nr_re;
  assign d_im[0] = nr_im;
  for (genvar d = 1; d < ND; d++) begin : g_dly
    always_ff @(posedge clk) begin
      if (n_tag.valid) begin
        d_re[d] <= d_re[d-1];
        d_im[d] <= d_im[d-1];
      end
    end
  end

  for (genvar d = 0; d < ND; d++) begin : g_vote
    // shift d has a partner pixel only from column d on (always for d = 0)
    logic en;
    if (d == 0) begin : g_always
      assign en = 1'b1;
    end else begin : g_from_col
      assign en = 32'(n_tag.x) >= d;
    end
    voting_func #(.LINE_W(LINE_W)) u_vf (
      .clk, .rst_n, .in_tag(n_tag), .en(en),
      .l_re(nl_re), .l_im(nl_im), .r_re(d_re[d]), .r_im(d_im[d]),
      .out_tag(v_tag[d]), .out_c(c[d])
    );
  end

  assign out_tag = v_tag[0];

endmodule
