// One radix-4 stage (stages 1 to 4) of the MDC FFT pipeline.
// Data path: radix-4 butterfly on the four lanes -> twiddle multiplication on
// lanes 1..3 (lane 0 always has twiddle 1) -> delay commutator. The stage
// computes the first decimation-in-frequency step of every sub-transform of
// M = 16*D points that passes through it: during one sequence of 4*D cycles
// lane l carries x[t + l*4*D], t = 0..4*D-1; lane k leaves the butterfly as
// y_k[t] and is multiplied by W_M^(t*k). The commutator then delivers the
// sub-transforms y_0..y_3 one after another, each as four quarters on the
// four lanes, which is exactly the input format of the next stage.
// One butterfly serves all four streams because the input buffer has already
// serialised them (stream A, B, C, D blocks follow each other).
// D = 2048/4**(STAGE+1) for the 2048/512/128 lengths and half that for 1024;
// a stage that the selected length does not use passes data and tags through
// unchanged. Latency when active: 3*D + 3 cycles (butterfly register,
// multiplier register, commutator).
// The structure (one butterfly, three multipliers, FIFOs of D/2D/3D on both
// sides of a switch box) follows the stage diagram of the design; the
// division by 2 after each butterfly is this implementation's scaling choice.
module r4_stage #(
  parameter int unsigned STAGE = 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                clr,   // synchronous restart
  input  fft_pkg::len_e                       len,
  input  logic signed [fft_pkg::DATA_W-1:0]   in_re  [4],
  input  logic signed [fft_pkg::DATA_W-1:0]   in_im  [4],
  input  fft_pkg::tag_t                       in_tag,
  output logic signed [fft_pkg::DATA_W-1:0]   out_re [4],
  output logic signed [fft_pkg::DATA_W-1:0]   out_im [4],
  output fft_pkg::tag_t                       out_tag
);
  import fft_pkg::*;

  localparam int unsigned DMAX = NMAX >> (2 * STAGE + 2);
  localparam int unsigned TW   = $clog2(4 * DMAX);

  logic       active;
  logic [2:0] dlog;
  assign active = stage_active(len, STAGE);
  assign dlog   = stage_dlog(len, STAGE);

  // time index inside the 4*D-cycle sequence
  logic [TW-1:0] t, t_cur;
  assign t_cur = (in_tag.valid && in_tag.first) ? '0 : t;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t <= '0;
    else if (clr) t <= '0;
    else if (32'(t_cur) + 1 >= (32'd4 << dlog)) t <= '0;
    else t <= t_cur + 1'b1;
  end

  // butterfly and its output register
  logic signed [DATA_W-1:0] bf_re [4], bf_im [4];
  logic signed [DATA_W-1:0] b_re  [4], b_im  [4];
  logic [TW-1:0]            t_q;
  logic                     first_q, first_q2;

  radix4_bf #(.IN_W(DATA_W), .OUT_W(DATA_W), .SHIFT(1)) u_bf (
    .x_re(in_re), .x_im(in_im), .y_re(bf_re), .y_im(bf_im));

  always_ff @(posedge clk) begin
    b_re    <= bf_re;
    b_im    <= bf_im;
    t_q     <= t_cur;
    first_q <= in_tag.valid && in_tag.first;
  end

  // twiddle multiplication, W_M^(t*k) with M = 16*D = NMAX >> (7 - dlog)
  logic signed [DATA_W-1:0] m_re [4], m_im [4];
  logic signed [DATA_W-1:0] p_re [4], p_im [4];
  assign p_re[0] = b_re[0];
  assign p_im[0] = b_im[0];

  for (genvar k = 1; k < 4; k++) begin : g_tf
    logic [NMAX_LOG-1:0]    e;
    logic signed [TW_W-1:0] w_re, w_im;
    assign e = NMAX_LOG'((32'(t_q) * k) << (3'd7 - dlog));
    twiddle_gen u_tw (.e(e), .w_re(w_re), .w_im(w_im));
    cmul #(.IN_W(DATA_W), .TW_W(TW_W), .TW_FRAC(TW_FRAC), .OUT_W(DATA_W)) u_mul (
      .x_re(b_re[k]), .x_im(b_im[k]), .w_re(w_re), .w_im(w_im),
      .p_re(p_re[k]), .p_im(p_im[k]));
  end

  always_ff @(posedge clk) begin
    m_re     <= p_re;
    m_im     <= p_im;
    first_q2 <= first_q;
  end

  // delay commutator on packed complex words
  logic [2*DATA_W-1:0] c_in [4], c_out [4];
  for (genvar k = 0; k < 4; k++) begin : g_pack
    assign c_in[k] = {m_re[k], m_im[k]};
  end

  commutator #(.W(2 * DATA_W), .DMAX(DMAX)) u_com (
    .clk, .rst_n, .clr, .dlog(dlog), .first(first_q2), .din(c_in), .dout(c_out));

  // tags follow the data with the stage latency 3*D + 3
  logic [15:0]    tag_len;
  tag_t           tag_d;
  assign tag_len = 16'd3 * (16'd1 << dlog) + 16'd3;
  delay_fifo #(.W($bits(tag_t)), .DMAX(3 * DMAX + 3)) u_tagd (
    .clk, .rst_n, .clr, .len(tag_len), .din(in_tag), .dout(tag_d));

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      out_re[k] = active ? $signed(c_out[k][2*DATA_W-1:DATA_W]) : in_re[k];
      out_im[k] = active ? $signed(c_out[k][DATA_W-1:0])        : in_im[k];
    end
    out_tag = active ? tag_d : in_tag;
  end

endmodule
