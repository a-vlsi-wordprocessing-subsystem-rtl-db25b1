// bidirmem: one on-chip predecessor cache.
//
// A small dual-ported memory that holds the values of the last DEPTH states.
// The write port is fed sequentially (one new value per pipeline cycle at a
// modulo-counter address, overwriting the oldest entry); the read port is
// addressed relative to that counter and so returns the value of a state a
// fixed distance back. Three of these, written with the same data, let the
// processor read three predecessors in one cycle. The depth of 16 is the
// design's; the read timing (asynchronous read from an address register held
// elsewhere) is this implementation's choice.
//
// Timing: a value written at a clock edge can be read in the next cycle.
module bidirmem #(
  parameter int W     = 14,
  parameter int DEPTH = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
