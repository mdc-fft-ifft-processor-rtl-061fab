// Dual-port synchronous RAM bank with write-after-read access.
// One address serves the read and the write of a cycle: the old word at addr
// appears on rdata one cycle later while wdata replaces it. This is the
// access the input scheduling relies on (each bank is read and refilled with
// new samples in the same pass). Written as an array, to be mapped to a RAM
// macro.
module dp_ram #(
  parameter int unsigned W     = 20,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end

endmodule
