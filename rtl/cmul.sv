// Complex multiplier for twiddle factors (combinational).
// p = x * w with w given in signed fixed point with TW_FRAC fractional bits.
// The product is computed with four real multiplications and two additions,
// rounded (round-half-up) back by TW_FRAC bits and saturated to OUT_W bits.
// The design description counts three twiddle multipliers per stage; how a
// multiplier is built is not described, so the direct four-multiplier form is
// used here.
module cmul #(
  parameter int unsigned IN_W    = 10,
  parameter int unsigned TW_W    = 12,
  parameter int unsigned TW_FRAC = 10,
  parameter int unsigned OUT_W   = 10
) (
  input  logic signed [IN_W-1:0]  x_re,
  input  logic signed [IN_W-1:0]  x_im,
  input  logic signed [TW_W-1:0]  w_re,
  input  logic signed [TW_W-1:0]  w_im,
  output logic signed [OUT_W-1:0] p_re,
  output logic signed [OUT_W-1:0] p_im
);
  import fft_pkg::*;

  logic signed [31:0] pr, pi;

  always_comb begin
    pr = 32'(x_re) * 32'(w_re) - 32'(x_im) * 32'(w_im);
    pi = 32'(x_re) * 32'(w_im) + 32'(x_im) * 32'(w_re);
    p_re = OUT_W'(rnd_sat(pr, TW_FRAC, OUT_W));
    p_im = OUT_W'(rnd_sat(pi, TW_FRAC, OUT_W));
  end

endmodule
