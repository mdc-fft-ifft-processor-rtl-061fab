// Delay commutator of an MDC stage: FIFOs of 0, D, 2D, 3D words on the four
// input lanes, a switch box, and FIFOs of 3D, 2D, D, 0 words on the outputs.
// It turns four lanes that each carry one sequence of 4*D samples into four
// consecutive blocks of D cycles in which the four lanes carry the four
// quarters of one of those sequences: with input lane b carrying y_b[t], the
// output during block b, cycle r, is y_b[r + j*D] on lane j. first marks the
// cycle in which lane 0 carries y_0[0]; the switch box changes its routing
// every D cycles (D = 2**dlog) counted from there. Latency: 3*D + 1 cycles
// (the switch box output is registered).
// The FIFO arrangement follows the stage diagram of the design; the routing
// rule of the switch box is derived from it.
module commutator #(
  parameter int unsigned W    = 20,
  parameter int unsigned DMAX = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,       // synchronous restart
  input  logic [2:0]   dlog,      // log2(D), D <= DMAX
  input  logic         first,
  input  logic [W-1:0] din  [4],
  output logic [W-1:0] dout [4]
);

  localparam int unsigned CW = $clog2(4 * DMAX);

  logic [W-1:0]  pre  [4];
  logic [W-1:0]  sw   [4];
  logic [W-1:0]  sw_q [4];
  logic [CW-1:0] cnt;
  logic [CW-1:0] cnt_cur;
  logic [1:0]    phase;
  logic [15:0]   d;

  assign d = 16'd1 << dlog;

  // position inside the 4*D cycle period, 0 when first is high
  assign cnt_cur = first ? '0 : cnt;
  assign phase   = 2'(cnt_cur >> dlog);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (clr) cnt <= '0;
    else if (32'(cnt_cur) + 1 >= (32'd4 << dlog)) cnt <= '0;
    else cnt <= cnt_cur + 1'b1;
  end

  for (genvar k = 0; k < 4; k++) begin : g_lane
    delay_fifo #(.W(W), .DMAX(k * DMAX)) u_pre (
      .clk, .rst_n, .clr, .len(d * 16'(k)),
      .din(din[k]), .dout(pre[k]));
    delay_fifo #(.W(W), .DMAX((3 - k) * DMAX)) u_post (
      .clk, .rst_n, .clr, .len(d * 16'(3 - k)),
      .din(sw_q[k]), .dout(dout[k]));
  end

  switch_box #(.W(W)) u_sw (.phase(phase), .din(pre), .dout(sw));

  always_ff @(posedge clk) sw_q <= sw;

endmodule
