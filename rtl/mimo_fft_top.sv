// Four-stream variable-length MDC FFT/IFFT processor (top level).
// Four spatial streams A-D enter in parallel, one complex sample per stream
// and cycle; the processor transforms each stream's OFDM symbol of N = 2048,
// 1024, 512 or 128 points and returns the results stream after stream, four
// consecutive frequency bins per cycle in natural order. Because the input
// buffer serialises the streams, every pipeline stage needs only one radix-4
// butterfly and three twiddle multipliers and keeps them busy every cycle.
// Chain: input register (IFFT conjugation) -> input_buffer -> fft_core
// (stages 1-4 radix-4, stage 5 radix-4/8) -> output_sorter -> output register
// (IFFT conjugation). The IFFT is computed as conj(FFT(conj(x))).
// Interface:
//  * start: high in the cycle that carries sample 0 of the first symbol; it
//    also loads len_sel and ifft and restarts the whole pipeline (symbols in
//    flight are dropped). After start, samples must follow every cycle.
//  * out_valid/out_first/out_stream: out_re/out_im[l] carry X[4t + l] of
//    stream out_stream; out_first marks t = 0.
// Throughput: N cycles per set of four N-point symbols. Scaling: each active
// radix-4 stage of stages 1-4 divides by 2 and stage 5 does not scale, so the
// output equals the DFT times 1/16 (2048, 1024), 1/8 (512) or 1/4 (128);
// IFFT outputs carry the same factor instead of 1/N.
module mimo_fft_top (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  fft_pkg::len_e                     len_sel,
  input  logic                              ifft,
  input  logic signed [fft_pkg::IN_W-1:0]   in_re  [4],
  input  logic signed [fft_pkg::IN_W-1:0]   in_im  [4],
  output logic signed [fft_pkg::OUT_W-1:0]  out_re [4],
  output logic signed [fft_pkg::OUT_W-1:0]  out_im [4],
  output logic                              out_valid,
  output logic                              out_first,
  output logic [1:0]                        out_stream
);
  import fft_pkg::*;

  len_e len_r;
  logic ifft_r, ifft_c, start_q;
  logic signed [IN_W-1:0] x_re [4], x_im [4];

  assign ifft_c = start ? ifft : ifft_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_r   <= LEN_2048;
      ifft_r  <= 1'b0;
      start_q <= 1'b0;
      for (int s = 0; s < 4; s++) begin
        x_re[s] <= '0;
        x_im[s] <= '0;
      end
    end else begin
      start_q <= start;
      if (start) begin
        len_r  <= len_sel;
        ifft_r <= ifft;
      end
      for (int s = 0; s < 4; s++) begin
        x_re[s] <= in_re[s];
        x_im[s] <= ifft_c ? IN_W'(rnd_sat(-32'(in_im[s]), 0, IN_W)) : in_im[s];
      end
    end
  end

  logic signed [DATA_W-1:0] b_re [4], b_im [4];
  tag_t                     b_tag;
  input_buffer u_inbuf (
    .clk, .rst_n, .len(len_r), .start(start_q),
    .in_re(x_re), .in_im(x_im), .out_re(b_re), .out_im(b_im), .out_tag(b_tag));

  logic signed [OUT_W-1:0] c_re [4], c_im [4];
  tag_t                    c_tag;
  fft_core u_core (
    .clk, .rst_n, .clr(start_q), .len(len_r),
    .in_re(b_re), .in_im(b_im), .in_tag(b_tag),
    .out_re(c_re), .out_im(c_im), .out_tag(c_tag));

  logic signed [OUT_W-1:0] o_re [4], o_im [4];
  tag_t                    o_tag;
  output_sorter u_sort (
    .clk, .rst_n, .clr(start_q), .len(len_r),
    .in_re(c_re), .in_im(c_im), .in_tag(c_tag),
    .out_re(o_re), .out_im(o_im), .out_tag(o_tag));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_first  <= 1'b0;
      out_stream <= '0;
      for (int l = 0; l < 4; l++) begin
        out_re[l] <= '0;
        out_im[l] <= '0;
      end
    end else begin
      out_valid  <= o_tag.valid && !start_q;
      out_first  <= o_tag.valid && o_tag.first && !start_q;
      out_stream <= o_tag.stream;
      for (int l = 0; l < 4; l++) begin
        out_re[l] <= o_re[l];
        out_im[l] <= ifft_r ? OUT_W'(rnd_sat(-32'(o_im[l]), 0, OUT_W)) : o_im[l];
      end
    end
  end

endmodule
