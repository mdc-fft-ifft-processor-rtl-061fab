// Shift register delay that advances only when en is high.
// dout is the value din had len enable cycles earlier (0 <= len <= DMAX);
// len = 0 is a straight wire. Built from registers: in the output sorter it
// holds the small per-lane FIFOs of 4, 8 and 12 words, which are clocked once
// per group of four samples. Contents are cleared by reset and by clr.
module en_delay #(
  parameter int unsigned W    = 24,
  parameter int unsigned DMAX = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [4:0]   len,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DMAX == 0) begin : g_wire
    // nothing to store: clk, rst_n, clr, en and len are unused here
    assign dout = din;
  end else begin : g_sr
    logic [W-1:0] sr [DMAX];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DMAX; i++) sr[i] <= '0;
      end else if (clr) begin
        for (int i = 0; i < DMAX; i++) sr[i] <= '0;
      end else if (en) begin
        sr[0] <= din;
        for (int i = 1; i < DMAX; i++) sr[i] <= sr[i-1];
      end
    end

    always_comb begin
      dout = din;
      for (int i = 0; i < DMAX; i++)
        if (32'(len) == i + 1) dout = sr[i];
    end
  end

endmodule
