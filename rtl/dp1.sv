// dp1: one predecessor data path of the Viterbi processor.
//
// Computes P(O_{i-1},p) + A(p,s) for one predecessor p of the current state.
// The 8-bit transition probability enters with the topology row and is
// delayed to stage 3, where it meets the predecessor probability read from
// the cache at stage 2 (or an alternative value: the source grammar node
// probability on the first path, the worst value on the others). The sum is
// formed with a saturating adder (stage 4) and compared at stage 4 with the
// sum of a neighbouring path; stage 5 holds the sum for the minimum
// selection. Register names follow the design's block diagram.
//
// Timing: transprob_data at stage 0 (row inputs), pred2_data/alt2_data/sel2
// at stage 2, prob4_out/compresult at stage 4, prob5_out at stage 5. All
// registers hold while en is low.
module dp1 import wp_pkg::*; (
  input  logic          clk,
  input  logic          en,
  input  logic [TW-1:0] transprob_data,
  input  logic [PW-1:0] pred2_data,
  input  logic [PW-1:0] alt2_data,
  input  logic          sel2,
  input  logic [PW-1:0] compin,
  output logic [PW-1:0] prob4_out,
  output logic [PW-1:0] prob5_out,
  output logic          compresult
);
  logic [TW-1:0] transprob1, transprob2, transprob3;
  logic [PW-1:0] prob3, prob4, prob5;

  always_ff @(posedge clk) begin
    if (en) begin
      transprob1 <= transprob_data;
      transprob2 <= transprob1;
      transprob3 <= transprob2;
      prob3      <= sel2 ? alt2_data : pred2_data;
      prob4      <= sat_add(prob3, PW'(transprob3));
      prob5      <= prob4;
    end
  end

  assign compresult = (prob4 <= compin);
  assign prob4_out  = prob4;
  assign prob5_out  = prob5;
endmodule
