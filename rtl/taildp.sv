// taildp: output stages 9 to 11 of the Viterbi processor.
//
// prob8 is delayed to prob11_out, the new state probability written to the
// frame-i memory eleven stages after its row. The word minimum and the
// destination node probability are latched into their stage-11 registers
// when the first row of the next word reaches stage 9 (newword9): at that
// moment stage 10 holds the values that include the last row of the word.
// The frame minimum is latched when the last row of the frame is at stage 10
// (eof10) and is fed back as the normalisation value of the next frame.
// Structure per the design's block diagram; the latch stage of the frame
// minimum is this implementation's choice.
module taildp import wp_pkg::*; (
  input  logic          clk,
  input  logic          en,
  input  logic [PW-1:0] prob8_out,
  input  logic [PW-1:0] wordmin8_out,
  input  logic [PW-1:0] framemin8_out,
  input  logic [PW-1:0] gnprob10_out,
  input  logic          newword9,
  input  logic          eof10,
  output logic [PW-1:0] prob11_out,
  output logic [PW-1:0] wordmin11_out,
  output logic [PW-1:0] framemin11_out,
  output logic [PW-1:0] gnprob11_out
);
  logic [PW-1:0] prob9, prob10, wordmin9, wordmin10, framemin9, framemin10;

  always_ff @(posedge clk)
    if (en) begin
      prob9      <= prob8_out;
      prob10     <= prob9;
      prob11_out <= prob10;
      wordmin9   <= wordmin8_out;
      wordmin10  <= wordmin9;
      framemin9  <= framemin8_out;
      framemin10 <= framemin9;
      if (newword9) wordmin11_out  <= wordmin10;
      if (newword9) gnprob11_out   <= gnprob10_out;
      if (eof10)    framemin11_out <= framemin10;
    end
endmodule
