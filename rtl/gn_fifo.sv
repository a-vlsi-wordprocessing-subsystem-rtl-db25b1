// gn_fifo: synchronous FIFO between the word and grammar subsystems.
//
// One instance carries source grammar node entries (probability and tag) from
// the grammar subsystem to the Viterbi/backtrace processors, another carries
// the destination node results back. The head entry is visible on rdata
// whenever empty is low (first-word fall-through); pop removes it.
// full is an early flag: it rises when fewer than FULL_MARGIN+1 places are
// free, because the word subsystem decides to push up to FULL_MARGIN results
// that are still travelling down its pipeline. The depth and margin are this
// implementation's choice. Pushing into a truly full or popping an empty FIFO
// is a protocol error and is flagged by assertions.
module gn_fifo #(
  parameter int W           = 32,
  parameter int DEPTH       = 16,
  parameter int FULL_MARGIN = 3,
  localparam int AW         = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) begin
        mem[wp] <= wdata;
        wp <= wp + AW'(1);
      end
      if (pop) rp <= rp + AW'(1);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assign rdata = mem[rp];
  assign empty = (count == '0);
  assign full  = (int'(count) >= DEPTH - FULL_MARGIN);

  no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> (int'(count) < DEPTH) || pop);
  no_underflow: assert property (@(posedge clk) disable iff (rst) pop  |-> !empty);
endmodule
