// ctrl_shift: data-stationary control delay registers.
//
// The control word of a row is produced once, when the row enters the
// pipeline, and is shifted down a chain of DEPTH registers beside the data.
// A pipeline stage that needs a control bit taps the register of its own
// stage (stage k = k advancing edges after entry). This keeps the controller
// small: it never has to know which row is in which stage. The chain holds
// while en is low; reset clears it, so bubbles carry no events.
module ctrl_shift import wp_pkg::*; #(
  parameter int DEPTH = 13
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  ctrl_t c0,
  output ctrl_t cs [DEPTH+1]
);
  ctrl_t r [1:DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 1; k <= DEPTH; k++) r[k] <= '0;
    end else if (en) begin
      r[1] <= c0;
      for (int k = 2; k <= DEPTH; k++) r[k] <= r[k-1];
    end
  end

  always_comb begin
    cs[0] = c0;
    for (int k = 1; k <= DEPTH; k++) cs[k] = r[k];
  end
endmodule
