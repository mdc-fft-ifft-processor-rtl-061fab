// Delay FIFO with a run-time length.
// dout is din delayed by len clock cycles (0 <= len <= DMAX); len = 0 is a
// straight wire. The FIFO is a circular buffer of DMAX words: each cycle the
// word at the pointer is read out and replaced by the new input, and the
// pointer wraps after len words, so every word stays exactly len cycles. This
// push-and-pop behaviour, without any address arithmetic, is what the
// switch-box FIFOs of an MDC pipeline need. The buffer is read
// combinationally; with a synchronous SRAM macro the read register would
// count as one cycle of the delay. Until len words have been written after
// reset or clr the output is zero, so no uninitialised word ever leaves the FIFO.
// len must only change while the contents are not needed (a length change
// restarts the processor).
module delay_fifo #(
  parameter int unsigned W    = 20,
  parameter int unsigned DMAX = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,   // synchronous restart: empties the FIFO
  input  logic [15:0]   len,   // delay in cycles, at most DMAX
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);

  if (DMAX == 0) begin : g_wire
    // nothing to store: clk, rst_n, clr and len are not needed
    assign dout = din;
  end else begin : g_ring
    localparam int unsigned AW = (DMAX > 1) ? $clog2(DMAX) : 1;
    logic [W-1:0]  mem [DMAX];
    logic [AW-1:0] ptr;
    logic          filled;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ptr    <= '0;
        filled <= 1'b0;
      end else if (clr) begin
        ptr    <= '0;
        filled <= 1'b0;
      end else if (16'(ptr) + 16'd1 >= len) begin
        ptr    <= '0;
        filled <= 1'b1;
      end else begin
        ptr    <= ptr + 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (len != 16'd0) mem[ptr] <= din;
    end

    assign dout = (len == 16'd0) ? din : (filled ? mem[ptr] : '0);
  end

endmodule
