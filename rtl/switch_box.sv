// Switch box of a delay commutator (combinational 4x4 crossbar).
// In phase p (0..3) input lane k is routed to output lane (p - k) mod 4, so
// the four phases are four different permutations that together connect
// every input to every output once. The switch box of the design changes its
// routing rule every D cycles; this particular rule is derived here from the
// delays placed around it (input lane k delayed by k*D before, output lane j
// by (3-j)*D after), which make the commutator exchange the lane index with
// the time-block index.
module switch_box #(
  parameter int unsigned W = 20
) (
  input  logic [1:0]   phase,
  input  logic [W-1:0] din  [4],
  output logic [W-1:0] dout [4]
);

  always_comb begin
    for (int j = 0; j < 4; j++) dout[j] = din[2'(phase - 2'(j))];
  end

endmodule
