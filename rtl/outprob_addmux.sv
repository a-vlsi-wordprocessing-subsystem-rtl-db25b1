// outprob_addmux: joint output probability of the output memory.
//
// Each state may carry up to four output distributions, one per feature
// representation of the speech frame; the joint output probability is their
// product, which in the log domain is the sum of the four 8-bit values.
// mode 0 adds all four (saturating at the worst 8-bit value); mode 1..4
// passes feature 1..4 alone for models that use a single representation.
// Purely combinational; the design places it on the board, between the four
// distribution memories and the Viterbi processor. The mode encoding and the
// saturation are this implementation's.
module outprob_addmux #(
  parameter int BW = 8
) (
  input  logic [2:0]    mode,
  input  logic [BW-1:0] distp [4],
  output logic [BW-1:0] outprob
);
  logic [BW+1:0] sum;

  always_comb begin
    sum = '0;
    for (int k = 0; k < 4; k++) sum += (BW+2)'(distp[k]);
    unique case (mode)
      3'd1:    outprob = distp[0];
      3'd2:    outprob = distp[1];
      3'd3:    outprob = distp[2];
      3'd4:    outprob = distp[3];
      default: outprob = (sum > (BW+2)'({BW{1'b1}})) ? {BW{1'b1}} : sum[BW-1:0];
    endcase
  end
endmodule
