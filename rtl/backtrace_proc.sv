// backtrace_proc: the backtrace processor.
//
// Carries the backtrace tag (the pointer to the most likely predecessor word)
// from the best predecessor to each state, TAG(s,i) = TAG(argmin_p ..., i-1),
// and keeps the tag that belongs to the best word-end candidate of each word.
// It does no arithmetic: the Viterbi processor, working on the same row in
// the same cycle, tells it which predecessor won.
//
// Like the Viterbi processor it keeps the tags of the last 16 states in three
// caches (own predadd, same offsets, same counter reset). Path 1 takes the
// source grammar node tag when gnselect2 is high. The three tags are delayed
// to stage 5, where sela/selb pick one; morepredmux7 keeps the tag of the
// earlier row of a multi-row state; gndmux9 captures the tag of a new best
// word-end candidate and newword9 latches the finished word's tag.
// Timing: tag11_out leaves with prob11_out of the Viterbi processor, gntag11
// with gnprob11_out. Register counts follow the design's block diagram.
module backtrace_proc import wp_pkg::*; #(
  parameter int TW_TAG = TAGW
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              stall,
  input  logic              startcounter,
  input  logic [3*OFFW-1:0] predecessor_data,
  input  logic [TW_TAG-1:0] tagin_data,
  input  logic              popsource,
  input  logic [TW_TAG-1:0] srcndtag_data,
  input  logic              gnselect2,
  input  logic              sela,
  input  logic              selb,
  input  logic              morepredmux7,
  input  logic              gndmux9,
  input  logic              newword9,
  output logic [TW_TAG-1:0] tag11_out,
  output logic [TW_TAG-1:0] gntag11_out
);
  logic en;
  assign en = !stall;

  logic [OFFW-1:0]   writeadd, fpa2, spa2, tpa2;
  logic [TW_TAG-1:0] c1, c2, c3, tag1;

  always_ff @(posedge clk)
    if (en) tag1 <= tagin_data;

  predadd #(.AW(OFFW)) u_predadd (
    .clk, .rst, .en, .startcounter, .predecessor_data,
    .writeadd_data(writeadd), .firstpredadd2(fpa2), .seconpredadd2(spa2), .thirdpredadd2(tpa2));

  bidirmem #(.W(TW_TAG), .DEPTH(1 << OFFW)) bidirmem1 (
    .clk, .we(en), .waddr(writeadd), .wdata(tag1), .raddr(fpa2), .rdata(c1));
  bidirmem #(.W(TW_TAG), .DEPTH(1 << OFFW)) bidirmem2 (
    .clk, .we(en), .waddr(writeadd), .wdata(tag1), .raddr(spa2), .rdata(c2));
  bidirmem #(.W(TW_TAG), .DEPTH(1 << OFFW)) bidirmem3 (
    .clk, .we(en), .waddr(writeadd), .wdata(tag1), .raddr(tpa2), .rdata(c3));

  logic [TW_TAG-1:0] srcnd1, srcnd2;
  logic [TW_TAG-1:0] a3, a4, a5, b3, b4, b5, d3, d4, d5;
  logic [TW_TAG-1:0] sel5, t6, t7, t8, t9, t10, gt10;

  always_ff @(posedge clk) begin
    if (popsource) srcnd1 <= srcndtag_data;
    if (en) begin
      srcnd2 <= srcnd1;
      a3 <= gnselect2 ? srcnd2 : c1;  a4 <= a3;  a5 <= a4;
      b3 <= c2;                       b4 <= b3;  b5 <= b4;
      d3 <= c3;                       d4 <= d3;  d5 <= d4;
      t6  <= sel5;
      t7  <= t6;
      t8  <= morepredmux7 ? t8 : t7;
      t9  <= t8;
      t10 <= t9;
      tag11_out <= t10;
      if (gndmux9)  gt10 <= t9;
      if (newword9) gntag11_out <= gt10;
    end
  end

  always_comb begin
    unique case ({selb, sela})
      2'b00:   sel5 = a5;
      2'b01:   sel5 = b5;
      default: sel5 = d5;
    endcase
  end
endmodule
