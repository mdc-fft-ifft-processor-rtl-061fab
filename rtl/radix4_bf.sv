// Radix-4 butterfly (combinational).
// Computes Y[k] = sum_{l=0..3} x[l] * W4^(l*k), W4 = -j, for the four lanes
// presented in one cycle, then divides by 2**SHIFT with round-half-up and
// saturates to OUT_W bits. Multiplying by -j or +j is a swap of real and
// imaginary parts with a sign change, so the butterfly has only adders.
// The butterfly itself is the textbook radix-4 kernel named by the design; the
// per-stage scaling (SHIFT) is this implementation's choice.
module radix4_bf #(
  parameter int unsigned IN_W  = 10,
  parameter int unsigned OUT_W = 10,
  parameter int unsigned SHIFT = 1
) (
  input  logic signed [IN_W-1:0]  x_re [4],
  input  logic signed [IN_W-1:0]  x_im [4],
  output logic signed [OUT_W-1:0] y_re [4],
  output logic signed [OUT_W-1:0] y_im [4]
);
  import fft_pkg::*;

  logic signed [31:0] a_re, a_im, b_re, b_im, c_re, c_im, d_re, d_im;
  logic signed [31:0] s_re [4];
  logic signed [31:0] s_im [4];

  always_comb begin
    // a = x0 + x2, b = x0 - x2, c = x1 + x3, d = x1 - x3
    a_re = 32'(x_re[0]) + 32'(x_re[2]);
    a_im = 32'(x_im[0]) + 32'(x_im[2]);
    b_re = 32'(x_re[0]) - 32'(x_re[2]);
    b_im = 32'(x_im[0]) - 32'(x_im[2]);
    c_re = 32'(x_re[1]) + 32'(x_re[3]);
    c_im = 32'(x_im[1]) + 32'(x_im[3]);
    d_re = 32'(x_re[1]) - 32'(x_re[3]);
    d_im = 32'(x_im[1]) - 32'(x_im[3]);
    // Y0 = a + c, Y2 = a - c, Y1 = b - j d, Y3 = b + j d
    s_re[0] = a_re + c_re;  s_im[0] = a_im + c_im;
    s_re[2] = a_re - c_re;  s_im[2] = a_im - c_im;
    s_re[1] = b_re + d_im;  s_im[1] = b_im - d_re;
    s_re[3] = b_re - d_im;  s_im[3] = b_im + d_re;
    for (int k = 0; k < 4; k++) begin
      y_re[k] = OUT_W'(rnd_sat(s_re[k], SHIFT, OUT_W));
      y_im[k] = OUT_W'(rnd_sat(s_im[k], SHIFT, OUT_W));
    end
  end

endmodule
