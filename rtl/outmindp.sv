// outmindp: best predecessor, output probability, normalisation, minima.
//
// Stage 5: the predecessor multiplexer picks the smallest of the three sums
// (sela/selb) and adds the output probability P(o|s) (saturating) -> prob6.
// Stage 6: the previous frame's best value (oldmin) is subtracted, floored at
// zero; in the first frame nothing is subtracted -> prob7. This keeps the
// 14-bit values from drifting towards saturation frame after frame.
// Stage 7 -> 8, three running minima over prob7:
//   prob8    - the state value; for a state spread over several topology rows
//              (morepred7 on the continuation row) the better of the rows.
//   wordmin8 - the best value of the current word, restarted by newword7.
//   framemin8- the best value of the frame, restarted by newframe7.
// Bubbles (valid7 low) leave the minima alone.
// morepredmux7 tells the backtrace processor that prob8 kept the earlier row.
//
// The output probability is delayed from its arrival (OUTPROB_DELAY cycles
// after its row) to stage 5. The arithmetic and stages follow the design's
// block diagram; the comparator sense (keep the smaller value) follows the
// design text, and the bubble gating is this implementation's.
module outmindp import wp_pkg::*; #(
  parameter int OUTPROB_DELAY = 3
) (
  input  logic          clk,
  input  logic          en,
  input  logic          new6,
  input  logic [PW-1:0] firstprob5_out,
  input  logic [PW-1:0] seconprob5_out,
  input  logic [PW-1:0] thirdprob5_out,
  input  logic          sela,
  input  logic          selb,
  input  logic [TW-1:0] outprob_data,
  input  logic [PW-1:0] oldmin6_out,
  input  logic          valid7,
  input  logic          morepred7,
  input  logic          newword7,
  input  logic          newframe7,
  output logic          morepredmux7,
  output logic [PW-1:0] prob8_out,
  output logic [PW-1:0] wordmin8_out,
  output logic [PW-1:0] framemin8_out
);
  localparam int NDLY = 5 - OUTPROB_DELAY;

  logic [TW-1:0] outprob5;
  logic [PW-1:0] prob5, prob6, prob7, prob8, wordmin8, framemin8;

  // Output probability delay to stage 5.
  if (NDLY == 0) begin : g_nodly
    assign outprob5 = outprob_data;
  end else begin : g_dly
    logic [TW-1:0] d [NDLY];
    always_ff @(posedge clk)
      if (en) begin
        d[0] <= outprob_data;
        for (int k = 1; k < NDLY; k++) d[k] <= d[k-1];
      end
    assign outprob5 = d[NDLY-1];
  end

  always_comb begin
    unique case ({selb, sela})
      2'b00:   prob5 = firstprob5_out;
      2'b01:   prob5 = seconprob5_out;
      default: prob5 = thirdprob5_out;
    endcase
  end

  assign morepredmux7 = morepred7 && (prob8 <= prob7);

  always_ff @(posedge clk) begin
    if (en) begin
      prob6 <= sat_add(prob5, PW'(outprob5));
      prob7 <= sat_sub(prob6, new6 ? '0 : oldmin6_out);
      prob8 <= morepredmux7 ? prob8 : prob7;
      if (valid7 && (newword7 || prob7 < wordmin8))   wordmin8  <= prob7;
      if (valid7 && (newframe7 || prob7 < framemin8)) framemin8 <= prob7;
    end
  end

  assign prob8_out     = prob8;
  assign wordmin8_out  = wordmin8;
  assign framemin8_out = framemin8;
endmodule
