// Output sorting: puts the core's digit-reversed output into natural order.
// Input: for each stream, N/4 cycles of four lanes in the core's order. The
// first-stage digit k1 = k mod 4 is the top radix-4 digit of the cycle count;
// the last-stage digit sits on the lanes and, for the radix-8 lengths, also
// in the lowest cycle bit (which half of the spectrum). Output: for each
// stream, N/4 cycles in which lane l carries X[4*t + l], t = 0..N/4-1,
// streams in the order they arrive, blocks without gaps.
// Three stages, all controlled by push and pop only:
//  A  sort_half_split: separates the interlaced lower and upper halves
//     (FIFOs of N/16 and N/8 words per lane, 3N/4 words; bypassed for 1024).
//  B  a delay commutator (FIFOs 0/D/2D/3D, switch box, 3D/2D/D/0) that puts
//     k mod 4 on the lanes: D = N/32 for 2048, 512 and 128 and D = N/16 =
//     64 for 1024, so at most 3N/8 words for the largest length.
//  C  sort_digit_swap: per lane, exchanges the two base-4 digits of the
//     cycle count that are still reversed (4, 8 and 12 word FIFOs per
//     lane, 192 words; bypassed for 128).
// Memory: 3N/4 + 3N/8 + 192 = 9N/8 + 192 words, 2496 for N = 2048.
// Latency (start of a block in to start of the same block out), including
// the output register: 506 cycles for 2048, 250 for 1024, 134 for 512, 30
// for 128 (stage A N/8, stage B 3D+1, stage C 12F+8, one register).
// The stage structure, FIFO sizes, source control and bypasses follow the
// design; schedules and counters are this implementation's.
module output_sorter (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clr,
  input  fft_pkg::len_e                      len,
  input  logic signed [fft_pkg::OUT_W-1:0]   in_re  [4],
  input  logic signed [fft_pkg::OUT_W-1:0]   in_im  [4],
  input  fft_pkg::tag_t                      in_tag,
  output logic signed [fft_pkg::OUT_W-1:0]   out_re [4],
  output logic signed [fft_pkg::OUT_W-1:0]   out_im [4],
  output fft_pkg::tag_t                      out_tag
);
  import fft_pkg::*;

  localparam int unsigned W    = 2 * OUT_W;
  localparam int unsigned DMAX = NMAX / 32;

  logic [W-1:0] d_in [4], d_a [4], d_b [4], d_c [4];
  tag_t         t_a, t_b, t_c;

  for (genvar k = 0; k < 4; k++) begin : g_pack
    assign d_in[k] = {in_re[k], in_im[k]};
  end

  // stage A
  sort_half_split #(.W(W)) u_a (
    .clk, .rst_n, .clr, .len, .din(d_in), .in_tag, .dout(d_a), .out_tag(t_a));

  // stage B
  logic [2:0] dlog;
  always_comb begin
    unique case (len)
      LEN_2048: dlog = 3'd6;
      LEN_1024: dlog = 3'd6;
      LEN_512:  dlog = 3'd4;
      default:  dlog = 3'd2;
    endcase
  end

  commutator #(.W(W), .DMAX(DMAX)) u_b (
    .clk, .rst_n, .clr, .dlog(dlog), .first(t_a.valid && t_a.first),
    .din(d_a), .dout(d_b));

  delay_fifo #(.W($bits(tag_t)), .DMAX(3 * DMAX + 1)) u_tagb (
    .clk, .rst_n, .clr, .len(16'd3 * (16'd1 << dlog) + 16'd1),
    .din(t_a), .dout(t_b));

  // stage C
  sort_digit_swap #(.W(W)) u_c (
    .clk, .rst_n, .clr, .len, .din(d_b), .in_tag(t_b), .dout(d_c), .out_tag(t_c));

  // output register
  logic [W-1:0] q [4];
  tag_t         tag_q;
  always_ff @(posedge clk) q <= d_c;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   tag_q <= '0;
    else if (clr) tag_q <= '0;
    else          tag_q <= t_c;
  end

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      out_re[l] = $signed(q[l][W-1:OUT_W]);
      out_im[l] = $signed(q[l][OUT_W-1:0]);
    end
  end
  assign out_tag = tag_q;

endmodule
