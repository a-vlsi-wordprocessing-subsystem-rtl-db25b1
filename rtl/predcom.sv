// predcom: the three predecessor data paths and their comparison ring.
//
// Three dp1 paths add the transition probabilities of the three predecessors
// named by one topology word. Their stage-4 sums are compared in a ring:
// first <= second (fisecom), second <= third (sethcom), third <= first
// (thficom); minpla turns these three bits into the select of the smallest
// sum. The first path takes the source grammar node probability instead of
// its cache value when gnselect2 is high; the other two take the worst value
// during the first frame. The ring and the gnselect connection follow the
// design's netlist; the worst-value alternative of paths 2 and 3 is this
// implementation's reading.
module predcom import wp_pkg::*; (
  input  logic          clk,
  input  logic          en,
  input  logic          new2,
  input  logic          gnselect2,
  input  logic [PW-1:0] srcndprob2_data,
  input  logic [TW-1:0] firsttransprob_data,
  input  logic [TW-1:0] secontransprob_data,
  input  logic [TW-1:0] thirdtransprob_data,
  input  logic [PW-1:0] firstpred2_data,
  input  logic [PW-1:0] seconpred2_data,
  input  logic [PW-1:0] thirdpred2_data,
  output logic [PW-1:0] firstprob5_out,
  output logic [PW-1:0] seconprob5_out,
  output logic [PW-1:0] thirdprob5_out,
  output logic          fisecom,
  output logic          sethcom,
  output logic          thficom
);
  logic [PW-1:0] firstprob4, seconprob4, thirdprob4;

  dp1 firstdp1 (
    .clk, .en, .transprob_data(firsttransprob_data), .pred2_data(firstpred2_data),
    .alt2_data(srcndprob2_data), .sel2(gnselect2), .compin(seconprob4),
    .prob4_out(firstprob4), .prob5_out(firstprob5_out), .compresult(fisecom));
  dp1 secondp1 (
    .clk, .en, .transprob_data(secontransprob_data), .pred2_data(seconpred2_data),
    .alt2_data(PWORST), .sel2(new2), .compin(thirdprob4),
    .prob4_out(seconprob4), .prob5_out(seconprob5_out), .compresult(sethcom));
  dp1 thirddp1 (
    .clk, .en, .transprob_data(thirdtransprob_data), .pred2_data(thirdpred2_data),
    .alt2_data(PWORST), .sel2(new2), .compin(firstprob4),
    .prob4_out(thirdprob4), .prob5_out(thirdprob5_out), .compresult(thficom));
endmodule
