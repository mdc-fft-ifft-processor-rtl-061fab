// Stage C of the output sorter: per-lane exchange of two base-4 digits of
// the cycle count.
// After stages A and B each lane still has two base-4 digits of its cycle
// count in the wrong place: those of weight 16 and 1 for N = 2048 and 1024,
// those of weight 4 and 1 for N = 512; N = 128 needs nothing (bypass).
// Each lane is first cut into groups of four consecutive words (serial to
// parallel), so the weight-1 digit becomes a sub-lane index. The four
// sub-lanes then pass a small delay commutator that advances once per group:
// FIFOs of 0, F, 2F, 3F groups before a switch box and 3F, 2F, F, 0 after it
// (F = 4 groups for 2048/1024, giving the 4, 8 and 12 word FIFOs of the
// design, and F = 1 group for 512). It exchanges the sub-lane index with the
// group-count digit of weight F. Parallel to serial conversion then emits
// sub-lane j in the j-th cycle of each group.
// Latency: 12*F + 8 cycles (56 for 2048/1024, 20 for 512, 0 for 128).
// The FIFO sizes, the switch box and the bypass for 128 follow the design;
// running the same commutator with F = 1 for 512 instead of a separate
// 4x4 transposition is this implementation's choice.
module sort_digit_swap #(
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

  localparam int unsigned FMAX = 4;

  logic        bypass;
  logic [1:0]  flog;                 // log2(F)
  logic [4:0]  f;
  logic [15:0] lat;
  assign bypass = (len == LEN_128);
  assign flog   = (len == LEN_512) ? 2'd0 : 2'd2;
  assign f      = 5'd1 << flog;
  assign lat    = bypass ? 16'd0 : 16'd12 * 16'(f) + 16'd8;

  // position within the group of four and group count within a period
  logic [1:0] c, c_c;
  logic [3:0] g, g_c;
  logic       en;
  assign c_c = (in_tag.valid && in_tag.first) ? 2'd0 : c;
  assign g_c = (in_tag.valid && in_tag.first) ? 4'd0 : g;
  assign en  = (c_c == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0;
      g <= '0;
    end else if (clr) begin
      c <= '0;
      g <= '0;
    end else begin
      c <= c_c + 1'b1;
      if (en) g <= ((32'(g_c) + 1) >= (32'd4 << flog)) ? 4'd0 : g_c + 1'b1;
      else    g <= g_c;
    end
  end

  logic [1:0] phase;
  assign phase = 2'(g_c >> flog);

  delay_fifo #(.W($bits(tag_t)), .DMAX(12 * FMAX + 8)) u_tagd (
    .clk, .rst_n, .clr, .len(lat), .din(in_tag), .dout(out_tag));

  for (genvar l = 0; l < 4; l++) begin : g_lane
    logic [W-1:0] s [3];
    logic [W-1:0] grp [4], pre [4], sw [4], sw_q [4], post [4], o [4];

    // serial to parallel
    always_ff @(posedge clk) begin
      if (c_c != 2'd3) s[c_c] <= din[l];
    end
    assign grp[0] = s[0];
    assign grp[1] = s[1];
    assign grp[2] = s[2];
    assign grp[3] = din[l];

    for (genvar k = 0; k < 4; k++) begin : g_sub
      en_delay #(.W(W), .DMAX(k * FMAX)) u_pre (
        .clk, .rst_n, .clr, .en, .len(f * 5'(k)), .din(grp[k]), .dout(pre[k]));
      en_delay #(.W(W), .DMAX((3 - k) * FMAX)) u_post (
        .clk, .rst_n, .clr, .en, .len(f * 5'(3 - k)), .din(sw_q[k]), .dout(post[k]));
    end

    switch_box #(.W(W)) u_sw (.phase(phase), .din(pre), .dout(sw));

    always_ff @(posedge clk) begin
      if (en) begin
        sw_q <= sw;
        o    <= post;
      end
    end

    // parallel to serial: sub-lane j leaves in cycle j of the next group
    assign dout[l] = bypass ? din[l] : o[c_c];
  end

endmodule
