// Stage A of the output sorter: separates the two interlaced halves.
// With a radix-8 last stage (N = 2048, 512, 128) the core delivers the bins
// of the lower half (k < N/2) in the even cycles of a stream block and those
// of the upper half in the odd cycles. Per lane, the even-cycle words are
// pushed into a FIFO of N/16 words and the odd-cycle words into a FIFO of
// N/8 words. Half a block (N/8 cycles) after the block started, the output
// pops the lower-half FIFO once per cycle for N/8 cycles and then the
// upper-half FIFO for N/8 cycles, so each block leaves as its lower half
// followed by its upper half, gap-free, and the next block follows directly.
// A lower-half word with index m is pushed in cycle 2m and popped in cycle
// N/8 + m; an upper-half word is pushed in cycle 2m+1 and popped in cycle
// N/4 + m, which bounds the two FIFOs at N/16 and N/8 words.
// For N = 1024 the core output is not interlaced and the stage is bypassed.
// Latency: N/8 cycles (0 for 1024). Tags travel through a delay line.
// The FIFO sizes and the pure push/pop control follow the design; the
// half-block start of the output is this implementation's schedule.
module sort_half_split #(
  parameter int unsigned W = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  fft_pkg::len_e len,
  input  logic [W-1:0]  din  [4],
  input  fft_pkg::tag_t in_tag,
  output logic [W-1:0]  dout [4],
  output fft_pkg::tag_t out_tag
);
  import fft_pkg::*;

  localparam int unsigned LMAX = NMAX / 4;        // longest block, 512
  localparam int unsigned CW   = $clog2(LMAX);

  logic          bypass;
  logic [CW-1:0] half;                          // N/8
  logic [15:0]   dly;
  assign bypass = (len == LEN_1024);
  assign half   = CW'(((32'd1 << len_log2(len)) / 8));
  assign dly    = bypass ? 16'd0 : 16'(half);

  // block-relative cycle count at the input and at the output
  logic [CW-1:0] ti, ti_c, uo, uo_c;
  tag_t          tag_d;
  assign ti_c = (in_tag.valid && in_tag.first) ? '0 : ti;
  assign uo_c = (tag_d.valid && tag_d.first) ? '0 : uo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ti <= '0;
      uo <= '0;
    end else if (clr) begin
      ti <= '0;
      uo <= '0;
    end else begin
      ti <= ti_c + 1'b1;
      uo <= uo_c + 1'b1;
    end
  end

  delay_fifo #(.W($bits(tag_t)), .DMAX(NMAX / 8)) u_tagd (
    .clk, .rst_n, .clr, .len(dly), .din(in_tag), .dout(tag_d));

  logic push_lo, push_hi, pop_lo, pop_hi;
  assign push_lo = !bypass && in_tag.valid && !ti_c[0];
  assign push_hi = !bypass && in_tag.valid &&  ti_c[0];
  assign pop_lo  = !bypass && tag_d.valid && (uo_c <  half);
  assign pop_hi  = !bypass && tag_d.valid && (uo_c >= half);

  for (genvar l = 0; l < 4; l++) begin : g_lane
    logic [W-1:0] lo, hi;
    pp_fifo #(.W(W), .DEPTH(NMAX / 16)) u_lo (
      .clk, .rst_n, .clr, .push(push_lo), .din(din[l]), .pop(pop_lo), .dout(lo));
    pp_fifo #(.W(W), .DEPTH(NMAX / 8)) u_hi (
      .clk, .rst_n, .clr, .push(push_hi), .din(din[l]), .pop(pop_hi), .dout(hi));
    // source control: lower half, upper half, or the core output directly
    assign dout[l] = bypass ? din[l] : ((uo_c < half) ? lo : hi);
  end

  assign out_tag = tag_d;

endmodule
