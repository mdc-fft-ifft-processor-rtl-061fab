// FFT/IFFT computing core: four radix-4 MDC stages and the radix-4/8 stage.
// The four lanes enter in the serial-block format made by the input buffer:
// for each stream, N/4 cycles in which lane l carries x[l*N/4 + t]. The
// stages are chained in order 1..5; the decomposition of the four lengths is
// 2048 = 4x4x4x4x8 (all stages, radix-8 last), 1024 = 4x4x4x4x4 (all stages,
// radix-4 last, commutator delays halved), 512 = 4x4x4x8 (stage 1 bypassed)
// and 128 = 4x4x8 (stages 1 and 2 bypassed), so the last three stages are
// shared by all lengths. The output stays in the core's digit-reversed
// order: for each stream, during N/4 cycles, lane and cycle carry the output
// index k = k1 + 4*k2 + ... whose first-stage digit k1 is the most
// significant digit of the cycle count and whose last digit is on the lanes
// (for the radix-8 lengths its top bit is the least significant cycle bit).
// Latency: sum over the active radix-4 stages of (3*D + 3), plus 3.
module fft_core (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clr,
  input  fft_pkg::len_e                      len,
  input  logic signed [fft_pkg::DATA_W-1:0]  in_re  [4],
  input  logic signed [fft_pkg::DATA_W-1:0]  in_im  [4],
  input  fft_pkg::tag_t                      in_tag,
  output logic signed [fft_pkg::OUT_W-1:0]   out_re [4],
  output logic signed [fft_pkg::OUT_W-1:0]   out_im [4],
  output fft_pkg::tag_t                      out_tag
);
  import fft_pkg::*;

  logic signed [DATA_W-1:0] s1_re [4], s1_im [4];
  logic signed [DATA_W-1:0] s2_re [4], s2_im [4];
  logic signed [DATA_W-1:0] s3_re [4], s3_im [4];
  logic signed [DATA_W-1:0] s4_re [4], s4_im [4];
  tag_t                     s1_tag, s2_tag, s3_tag, s4_tag;

  r4_stage #(.STAGE(1)) u_stage1 (
    .clk, .rst_n, .clr, .len,
    .in_re(in_re),  .in_im(in_im),  .in_tag(in_tag),
    .out_re(s1_re), .out_im(s1_im), .out_tag(s1_tag));

  r4_stage #(.STAGE(2)) u_stage2 (
    .clk, .rst_n, .clr, .len,
    .in_re(s1_re),  .in_im(s1_im),  .in_tag(s1_tag),
    .out_re(s2_re), .out_im(s2_im), .out_tag(s2_tag));

  r4_stage #(.STAGE(3)) u_stage3 (
    .clk, .rst_n, .clr, .len,
    .in_re(s2_re),  .in_im(s2_im),  .in_tag(s2_tag),
    .out_re(s3_re), .out_im(s3_im), .out_tag(s3_tag));

  r4_stage #(.STAGE(4)) u_stage4 (
    .clk, .rst_n, .clr, .len,
    .in_re(s3_re),  .in_im(s3_im),  .in_tag(s3_tag),
    .out_re(s4_re), .out_im(s4_im), .out_tag(s4_tag));

  r8_stage u_stage5 (
    .clk, .rst_n, .clr, .len,
    .in_re(s4_re), .in_im(s4_im), .in_tag(s4_tag),
    .out_re, .out_im, .out_tag);

endmodule
