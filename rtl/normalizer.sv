// normalizer: turns a complex filter response into a unit phasor.
//
// nre = re * 128 / |O|, nim = im * 128 / |O|, with |O| = floor(sqrt(re^2 +
// im^2)) and the division truncating toward zero; a zero response gives
// (0, 0). Removing the magnitude leaves only the local phase, which is what
// the phase-correlation vote compares. Since floor(sqrt()) is never below
// |re| or |im|, each output lies in [-128, 128] (Q1.7 in 9 bits).
//
// Normalising left and right responses before the cross product follows
// the published architecture; the square root (restoring, one result bit
// per step, unrolled) and the integer divider are this design's choices.
// Timing: 1 clock, one sample per clock.
module normalizer
  import lwpc_pkg::*;
(
  input  logic                   clk,
  input  logic signed [O_W-1:0]  re,
  input  logic signed [O_W-1:0]  im,
  output logic signed [PH_W-1:0] nre,
  output logic signed [PH_W-1:0] nim
);

  function automatic logic [15:0] isqrt32(input logic [31:0] v);
    logic [31:0] rem, res, bitv;
    rem  = v;
    res  = '0;
    bitv = 32'h4000_0000;
    for (int i = 0; i < 16; i++) begin
      if (rem >= res + bitv) begin
        rem = rem - (res + bitv);
        res = (res >> 1) + bitv;
      end else begin
        res = res >> 1;
      end
      bitv = bitv >> 2;
    end
    return res[15:0];
  endfunction

  logic [31:0]        mag2;
  logic [15:0]        mag;
  logic signed [24:0] qre, qim;

  always_comb begin
    mag2 = 32'(re * re) + 32'(im * im);
    mag  = isqrt32(mag2);
    if (mag == '0) begin
      qre = '0;
      qim = '0;
    end else begin
      qre = (25'(re) <<< PH_FRAC) / signed'({9'b0, mag});
      qim = (25'(im) <<< PH_FRAC) / signed'({9'b0, mag});
    end
  end

  always_ff @(posedge clk) begin
    nre <= PH_W'(qre);
    nim <= PH_W'(qim);
  end

endmodule
