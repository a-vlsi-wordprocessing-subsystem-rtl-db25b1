// dgndalu: destination grammar node probability of a word.
//
// The probability that a word ends is the best, over the states of the word,
// of P(O_i,s) plus the state's transition probability to the end of the word.
// The 8-bit word-end transition probability is delayed eight stages to meet
// prob8; the saturating sum is registered as gnprob9; a running minimum over
// the word (restarted by newword9) is kept in gnprob10. States without a
// word-end transition (dgnenable low) offer the worst value. gndmux9 is high
// when gnprob10 takes the new candidate, and tells the backtrace processor to
// take the matching tag. Stages follow the design's block diagram; the
// dgnenable gating and the bubble gating are this implementation's.
module dgndalu import wp_pkg::*; (
  input  logic          clk,
  input  logic          en,
  input  logic [TW-1:0] gntransprob_data,
  input  logic [PW-1:0] prob8_out,
  input  logic          valid9,
  input  logic          dgnenable9,
  input  logic          newword9,
  output logic          gndmux9,
  output logic [PW-1:0] gnprob10_out
);
  logic [TW-1:0] gntrans [8];
  logic [PW-1:0] gnprob9, gnprob10, cand9;

  always_ff @(posedge clk)
    if (en) begin
      gntrans[0] <= gntransprob_data;
      for (int k = 1; k < 8; k++) gntrans[k] <= gntrans[k-1];
    end

  assign cand9   = dgnenable9 ? gnprob9 : PWORST;
  assign gndmux9 = valid9 && (newword9 || cand9 < gnprob10);

  always_ff @(posedge clk)
    if (en) begin
      gnprob9 <= sat_add(prob8_out, PW'(gntrans[7]));
      if (gndmux9) gnprob10 <= cand9;
    end

  assign gnprob10_out = gnprob10;
endmodule
