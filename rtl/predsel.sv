// predsel: the three predecessor caches.
//
// The state probability of frame i-1 that arrives with each row is written
// into all three bidirmem caches at the common write address; each cache is
// read at the address of one predecessor. While first_frame is high (the
// first frame of an utterance) the stored values are meaningless, so the
// worst value is written instead: every predecessor then loses against the
// source grammar node. Where the "disregard" of the first frame acts is this
// implementation's choice.
//
// Interface: stprobin_data arrives with its row (stage 0) and is registered
// at stage 1; it is written into the caches at the end of stage 1, at the
// slot predadd gives for that row (en = pipeline advance). Read data is
// combinational from the stage-2 address registers of predadd.
module predsel import wp_pkg::*; #(
  parameter int W = PW
) (
  input  logic            clk,
  input  logic            en,
  input  logic            first_frame,
  input  logic [W-1:0]    stprobin_data,
  input  logic [OFFW-1:0] writeadd_data,
  input  logic [OFFW-1:0] firstpredadd2,
  input  logic [OFFW-1:0] seconpredadd2,
  input  logic [OFFW-1:0] thirdpredadd2,
  output logic [W-1:0]    firstpred2_data,
  output logic [W-1:0]    seconpred2_data,
  output logic [W-1:0]    thirdpred2_data
);
  logic [W-1:0] wdata;

  // stage-1 register of the incoming value
  always_ff @(posedge clk)
    if (en) wdata <= first_frame ? {W{1'b1}} : stprobin_data;

  bidirmem #(.W(W), .DEPTH(1 << OFFW)) bidirmem1 (
    .clk, .we(en), .waddr(writeadd_data), .wdata, .raddr(firstpredadd2), .rdata(firstpred2_data));
  bidirmem #(.W(W), .DEPTH(1 << OFFW)) bidirmem2 (
    .clk, .we(en), .waddr(writeadd_data), .wdata, .raddr(seconpredadd2), .rdata(seconpred2_data));
  bidirmem #(.W(W), .DEPTH(1 << OFFW)) bidirmem3 (
    .clk, .we(en), .waddr(writeadd_data), .wdata, .raddr(thirdpredadd2), .rdata(thirdpred2_data));
endmodule
