// Push/pop FIFO of DEPTH words (first in, first out).
// A word is written at the write pointer when push is high; dout always
// shows the word at the read pointer (combinational read), and pop moves the
// read pointer on. Push and pop may happen in the same cycle. There is no
// full or empty flag: the user schedules pushes and pops so that the FIFO
// never holds more than DEPTH words and is never popped when empty. clr
// empties it. Used for the half-separating FIFOs of the output sorter, whose
// memory control is pure push and pop, without addressing.
module pp_fifo #(
  parameter int unsigned W     = 24,
  parameter int unsigned DEPTH = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (clr) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (pop)  rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  assign dout = mem[rp];

endmodule
