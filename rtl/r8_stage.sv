// Last pipeline stage (stage 5): radix-8 butterfly that can be configured as
// a radix-4 butterfly.
// Radix-8 mode (N = 2048, 512, 128): an 8-point transform arrives in two
// cycles, lane l carrying x[i + 2*l] in cycle i = 0, 1. The radix-4 butterfly
// gives Y_i[q] = sum_l x[2l+i] W4^(lq). The cycle-0 result is held in a
// register; the cycle-1 result is multiplied by the constant W8^q
// (q = 0: 1, q = 1: (1-j)/sqrt2, q = 2: -j, q = 3: -(1+j)/sqrt2) and four
// radix-2 butterflies form X[q] = Y_0[q] + W8^q Y_1[q] and
// X[q+4] = Y_0[q] - W8^q Y_1[q]. X[q] leaves on lane q in one cycle and
// X[q+4] on the same lane in the next, so the output is X[4i + lane].
// Radix-4 mode (N = 1024): the radix-2 part is bypassed and Y_0 leaves
// directly. Latency is 3 cycles in both modes. No scaling is applied: the
// output grows from DATA_W to OUT_W bits, with saturation.
// The split into one radix-4 and four radix-2 butterflies, the two constant
// multipliers and the register that holds the even half follow the design's
// radix-4/8 butterfly; the 1/sqrt2 constant width is this implementation's.
module r8_stage (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clr,   // synchronous restart
  input  fft_pkg::len_e                      len,
  input  logic signed [fft_pkg::DATA_W-1:0]  in_re  [4],
  input  logic signed [fft_pkg::DATA_W-1:0]  in_im  [4],
  input  fft_pkg::tag_t                      in_tag,
  output logic signed [fft_pkg::OUT_W-1:0]   out_re [4],
  output logic signed [fft_pkg::OUT_W-1:0]   out_im [4],
  output fft_pkg::tag_t                      out_tag
);
  import fft_pkg::*;

  // 1/sqrt(2) with 12 fractional bits
  localparam int signed INV_SQRT2 = 2896;
  localparam int unsigned C_FRAC  = 12;

  logic radix8_en;
  assign radix8_en = (len != LEN_1024);

  // input pair index i (0 or 1), restarted by the block tag
  logic i_cur, i_nxt;
  assign i_cur = (in_tag.valid && in_tag.first) ? 1'b0 : i_nxt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   i_nxt <= 1'b0;
    else if (clr) i_nxt <= 1'b0;
    else          i_nxt <= ~i_cur;
  end

  logic signed [OUT_W-1:0] bf_re [4], bf_im [4];
  logic signed [OUT_W-1:0] y_re  [4], y_im  [4];   // radix-4 result register
  logic signed [OUT_W-1:0] y0_re [4], y0_im [4];   // held even half Y_0
  logic signed [OUT_W-1:0] yd_re [4], yd_im [4];   // radix-4 mode delay
  logic signed [OUT_W-1:0] dq_re [4], dq_im [4];   // X[q+4] waiting one cycle
  logic                    i_q;                    // pair index of y

  radix4_bf #(.IN_W(DATA_W), .OUT_W(OUT_W), .SHIFT(0)) u_bf (
    .x_re(in_re), .x_im(in_im), .y_re(bf_re), .y_im(bf_im));

  // constant twiddles W8^q applied to Y_1, and the radix-2 butterflies
  logic signed [31:0] z_re [4], z_im [4];
  logic signed [OUT_W-1:0] s_re [4], s_im [4], d_re [4], d_im [4];

  always_comb begin
    logic signed [31:0] a, b;
    for (int q = 0; q < 4; q++) begin
      a = 32'(y_re[q]);
      b = 32'(y_im[q]);
      case (q)
        0: begin z_re[q] = a; z_im[q] = b; end
        1: begin   // (a + jb)(1 - j)/sqrt2 = ((a + b) + j(b - a))/sqrt2
          z_re[q] = rnd_sat((a + b) * INV_SQRT2, C_FRAC, 31);
          z_im[q] = rnd_sat((b - a) * INV_SQRT2, C_FRAC, 31);
        end
        2: begin z_re[q] = b; z_im[q] = -a; end   // times -j
        default: begin   // (a + jb)(-1 - j)/sqrt2 = ((b - a) - j(a + b))/sqrt2
          z_re[q] = rnd_sat((b - a) * INV_SQRT2, C_FRAC, 31);
          z_im[q] = rnd_sat(-(a + b) * INV_SQRT2, C_FRAC, 31);
        end
      endcase
      s_re[q] = OUT_W'(rnd_sat(32'(y0_re[q]) + z_re[q], 0, OUT_W));
      s_im[q] = OUT_W'(rnd_sat(32'(y0_im[q]) + z_im[q], 0, OUT_W));
      d_re[q] = OUT_W'(rnd_sat(32'(y0_re[q]) - z_re[q], 0, OUT_W));
      d_im[q] = OUT_W'(rnd_sat(32'(y0_im[q]) - z_im[q], 0, OUT_W));
    end
  end

  always_ff @(posedge clk) begin
    y_re  <= bf_re;
    y_im  <= bf_im;
    i_q   <= i_cur;
    yd_re <= y_re;
    yd_im <= y_im;
    if (!i_q) begin
      y0_re <= y_re;
      y0_im <= y_im;
    end else begin
      dq_re <= d_re;
      dq_im <= d_im;
    end
    if (!radix8_en) begin
      out_re <= yd_re;
      out_im <= yd_im;
    end else if (i_q) begin
      out_re <= s_re;
      out_im <= s_im;
    end else begin
      out_re <= dq_re;
      out_im <= dq_im;
    end
  end

  // tags: three register stages
  tag_t tag_q [3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) tag_q[k] <= '0;
    end else if (clr) begin
      for (int k = 0; k < 3; k++) tag_q[k] <= '0;
    end else begin
      tag_q[0] <= in_tag;
      tag_q[1] <= tag_q[0];
      tag_q[2] <= tag_q[1];
    end
  end
  assign out_tag = tag_q[2];

endmodule
