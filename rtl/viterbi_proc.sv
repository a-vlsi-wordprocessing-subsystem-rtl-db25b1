// viterbi_proc: the Viterbi processor.
//
// For every state s, one topology row per cycle, it computes
//   P(O_i,s) = min over p [ P(O_{i-1},p) + A(p,s) ] + B(o_i|s) - framemin(i-1)
// in the log domain (smaller = more likely), for three predecessors at a time.
// A state with more than three predecessors takes several consecutive rows;
// the best of them is kept (morepred). The predecessor values come from three
// on-chip caches of the last 16 states, filled by the sequential stream of
// frame i-1 values, so the off-chip memory is read once per state. Beside the
// state probability the processor keeps the best value of each word (for
// pruning), the best value of the frame (normalisation of the next frame) and
// the probability that the word ends (destination grammar node).
//
// Pipeline (stage k = k advancing edges after the row was at the inputs):
//   1 input registers and cache write, 2 predecessor address add and
//   cache read, 3 operand select,
//   4 predecessor sums, 5 best-of-three select, 6 + output probability,
//   7 normalise, 8 minima, 9 word-end sum, 10 word-end minimum, 11 outputs.
// prob11_out (with write11) is the row's result eleven stages later.
// Control is data stationary: a control word made by the sequencer travels
// with the row (ctrl_shift). stall (FIFO empty/full, memorystall) holds every
// register. The output probability of a row must arrive OUTPROB_DELAY cycles
// after the row. The structure and stage numbers follow the design; the
// cycle alignment of the inputs is this implementation's.
// pushdest11 strobes a word's results (gnprob11_out, wordmin11_out) into the
// destination FIFO; pushdest13 is the same strobe two cycles later.
module viterbi_proc import wp_pkg::*; #(
  parameter int OUTPROB_DELAY = 3
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            first_frame,
  input  logic            startframe,
  input  logic            memorystall,
  input  logic            full,
  input  logic            empty,
  // row inputs (stage 0)
  input  logic [PW-1:0]   stprobin_data,
  input  logic [3*OFFW-1:0] predecessor_data,
  input  logic [TW-1:0]   firsttransprob_data,
  input  logic [TW-1:0]   secontransprob_data,
  input  logic [TW-1:0]   thirdtransprob_data,
  input  logic [TW-1:0]   gntransprob_data,
  input  logic            gnselect,
  input  logic            morepred,
  input  logic            dgnenable,
  input  logic            eow,
  input  logic            eof,
  input  logic [PW-1:0]   srcndprob_data,
  // output probability, OUTPROB_DELAY cycles after its row
  input  logic [TW-1:0]   outprob_data,
  // results
  output logic [PW-1:0]   prob11_out,
  output logic            write11,
  output logic [PW-1:0]   wordmin11_out,
  output logic [PW-1:0]   framemin11_out,
  output logic [PW-1:0]   gnprob11_out,
  output logic            pushdest11,
  output logic            pushdest13,
  output logic            endframe11,
  output logic            eof10,
  // control
  output seq_state_t      state,
  output logic            stall,
  output logic            take,
  output logic            startcounter,
  output logic            newframe,
  output logic            popsource,
  // to the backtrace processor
  output logic            gnselect2,
  output logic            sela,
  output logic            selb,
  output logic            morepredmux7,
  output logic            gndmux9,
  output logic            newword9
);
  logic  en;
  logic  newword, newframe_row, pushdest, endframe;
  ctrl_t c0;
  ctrl_t cs [NSTAGE+3];

  sequencer u_seq (
    .clk, .rst, .startframe, .memorystall, .eow, .eof, .full, .empty,
    .state, .stall, .take, .startcounter, .newframe, .popsource,
    .newword, .newframe_row, .pushdest, .endframe);

  assign en = !stall;

  always_comb begin
    c0           = '0;
    c0.valid     = take;
    c0.gnselect  = gnselect  && take;
    c0.morepred  = morepred  && take;
    c0.dgnenable = dgnenable && take;
    c0.eof       = eof       && take;
    c0.newword   = newword;
    c0.newframe  = newframe_row;
    c0.pushdest  = pushdest;
    c0.endframe  = endframe;
  end

  ctrl_shift #(.DEPTH(NSTAGE + 2)) u_shift (.clk, .rst, .en, .c0, .cs);

  // Source grammar node probability, captured when the source FIFO is popped.
  logic [PW-1:0] srcnd1, srcndprob2;
  always_ff @(posedge clk) begin
    if (popsource) srcnd1 <= srcndprob_data;
    if (en)        srcndprob2 <= srcnd1;
  end

  // Stage 1-2: addresses and caches.
  logic [OFFW-1:0] writeadd, fpa2, spa2, tpa2;
  logic [PW-1:0]   fpred2, spred2, tpred2;

  predadd #(.AW(OFFW)) u_predadd (
    .clk, .rst, .en, .startcounter, .predecessor_data,
    .writeadd_data(writeadd), .firstpredadd2(fpa2), .seconpredadd2(spa2), .thirdpredadd2(tpa2));

  predsel u_predsel (
    .clk, .en, .first_frame, .stprobin_data, .writeadd_data(writeadd),
    .firstpredadd2(fpa2), .seconpredadd2(spa2), .thirdpredadd2(tpa2),
    .firstpred2_data(fpred2), .seconpred2_data(spred2), .thirdpred2_data(tpred2));

  // Stage 3-5: predecessor sums and best-of-three.
  logic [PW-1:0] fp5, sp5, tp5;
  logic          fisecom, sethcom, thficom;

  assign gnselect2 = cs[2].gnselect;

  predcom u_predcom (
    .clk, .en, .new2(first_frame), .gnselect2, .srcndprob2_data(srcndprob2),
    .firsttransprob_data, .secontransprob_data, .thirdtransprob_data,
    .firstpred2_data(fpred2), .seconpred2_data(spred2), .thirdpred2_data(tpred2),
    .firstprob5_out(fp5), .seconprob5_out(sp5), .thirdprob5_out(tp5),
    .fisecom, .sethcom, .thficom);

  minpla u_minpla (.clk, .en, .fisecom, .sethcom, .thficom, .sela, .selb);

  // Stage 5-8.
  logic [PW-1:0] prob8, wordmin8, framemin8, gnprob10;

  outmindp #(.OUTPROB_DELAY(OUTPROB_DELAY)) u_outmindp (
    .clk, .en, .new6(first_frame),
    .firstprob5_out(fp5), .seconprob5_out(sp5), .thirdprob5_out(tp5), .sela, .selb,
    .outprob_data, .oldmin6_out(framemin11_out),
    .valid7(cs[7].valid), .morepred7(cs[7].morepred), .newword7(cs[7].newword),
    .newframe7(cs[7].newframe), .morepredmux7,
    .prob8_out(prob8), .wordmin8_out(wordmin8), .framemin8_out(framemin8));

  // Stage 9-10: word-end probability.
  dgndalu u_dgndalu (
    .clk, .en, .gntransprob_data, .prob8_out(prob8),
    .valid9(cs[9].valid), .dgnenable9(cs[9].dgnenable), .newword9(cs[9].newword),
    .gndmux9, .gnprob10_out(gnprob10));

  // Stage 9-11: outputs.
  assign newword9 = cs[9].newword;
  assign eof10    = cs[10].eof;

  taildp u_taildp (
    .clk, .en, .prob8_out(prob8), .wordmin8_out(wordmin8), .framemin8_out(framemin8),
    .gnprob10_out(gnprob10), .newword9, .eof10,
    .prob11_out, .wordmin11_out, .framemin11_out, .gnprob11_out);

  assign write11    = cs[NSTAGE].valid    && en;
  assign pushdest11 = cs[NSTAGE].pushdest && en;
  assign endframe11 = cs[NSTAGE].endframe && en;
  assign pushdest13 = cs[NSTAGE+2].pushdest && en;
endmodule
