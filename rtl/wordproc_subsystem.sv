// wordproc_subsystem: word processing subsystem of a real-time HMM recogniser.
//
// Runs the Viterbi search inside the word models for every state of the
// vocabulary once per 10 ms speech frame: it reads the HMM description
// (topology memory, output memories) and the state probabilities and tags of
// frame i-1 sequentially, one state per cycle, and writes those of frame i.
// The word-to-word part of the search lives in a separate grammar subsystem;
// the two exchange one source-node entry and one destination-node entry per
// word through the two FIFOs in here.
//
// Contents: the Viterbi processor and the backtrace processor working on the
// same row in lock step; the board logic around them: the row address counter
// shared by the topology, lookup and frame i-1 memories, the output
// probability path (lookup -> four distribution memories -> add/mux, three
// cycles), the write address of the frame-i memory (row address delayed
// eleven stages), the frame flip of the two state memories, and the FIFOs.
// The memories themselves are external: every memory port has one cycle read
// latency, and read addresses are driven so that the returned data holds
// while the pipeline is stalled.
//
// State memory word: {tag[31:14], probability[13:0]}. mem_sel tells which of
// the two is frame i-1 (read); the other one is written. It flips when the
// last result of a frame leaves the pipeline (frame_done).
// word_push marks the cycle in which a word's results (destination FIFO entry
// and wordmin11_out) are complete. The processor's two-cycle-later copy
// pushdest13 is left open: with a single clock, for words of five rows,
// wordmin11_out has already moved on to the next word by then.
// The FIFOs' fill counts are not needed here (their full/empty flags are) and
// are left unread.
// Host side: startframe starts a frame (asynchronous), first_frame marks the
// first frame of an utterance, feat holds the four vector-quantised features
// of the frame, om_mode selects sum or a single feature. Organisation follows
// the design's subsystem block diagram; address and latency details are this
// implementation's.
module wordproc_subsystem import wp_pkg::*; #(
  parameter int ADDR_W = 18,
  parameter int LUT_W  = 14,
  parameter int FEAT_W = 8,
  parameter int FIFO_DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  // host
  input  logic                    startframe,
  input  logic                    first_frame,
  input  logic                    memorystall,
  input  logic [2:0]              om_mode,
  input  logic [FEAT_W-1:0]       feat [4],
  output logic                    frame_done,
  output logic                    mem_sel,
  output seq_state_t              seq_state,
  // topology, output lookup and frame i-1 memories: common row address
  output logic [ADDR_W-1:0]       row_addr,
  input  topo_row_t               topo_data,
  input  logic [LUT_W-1:0]        lut_data,
  // output distribution memories
  output logic [LUT_W+FEAT_W-1:0] dist_addr [4],
  input  logic [TW-1:0]           dist_data [4],
  // the two state probability memories
  output logic [ADDR_W-1:0]       sp_addr  [2],
  output logic                    sp_we    [2],
  output logic [PW+TAGW-1:0]      sp_wdata [2],
  input  logic [PW+TAGW-1:0]      sp_rdata [2],
  // grammar subsystem: source node entries in, destination node results out
  input  logic                    src_push,
  input  logic [PW+TAGW-1:0]      src_wdata,
  output logic                    src_full,
  input  logic                    dst_pop,
  output logic [PW+TAGW-1:0]      dst_rdata,
  output logic                    dst_empty,
  // backtrace memory processor (pruning threshold): wordmin11_out belongs to
  // the word just pushed and is to be sampled with word_push
  output logic [PW-1:0]           wordmin11_out,
  output logic                    word_push,
  // status
  output logic                    newframe,
  output logic                    eof10,
  output logic [PW-1:0]           framemin11_out
);
  localparam int FAW = $clog2(FIFO_DEPTH);

  logic stall, en, take, startcounter, popsource;
  logic write11, pushdest11, endframe11;
  logic gnselect2, sela, selb, morepredmux7, gndmux9, newword9;
  logic [PW-1:0] prob11, gnprob11;
  logic [TAGW-1:0] tag11, gntag11;
  logic [TW-1:0] outprob_q;
  logic [PW+TAGW-1:0] sp_row, src_head;
  logic src_empty, dst_full;
  logic [FAW:0] src_count, dst_count;

  assign en = !stall;

  // Row address counter: the address whose data the memories return next.
  logic [ADDR_W-1:0] cur, addr_next;
  always_comb begin
    if (startcounter) addr_next = '0;
    else if (take)    addr_next = cur + ADDR_W'(1);
    else              addr_next = cur;
  end
  always_ff @(posedge clk) begin
    if (rst) cur <= '0;
    else     cur <= addr_next;
  end
  assign row_addr = addr_next;

  // Row address delayed to stage 11: write address of the frame-i memory.
  logic [ADDR_W-1:0] waddr [1:NSTAGE];
  always_ff @(posedge clk)
    if (en) begin
      waddr[1] <= cur;
      for (int k = 2; k <= NSTAGE; k++) waddr[k] <= waddr[k-1];
    end

  // Output probability path: distribution address (1), memory (2), add/mux (3).
  logic [LUT_W+FEAT_W-1:0] dreg [4], dq [4];
  logic [TW-1:0] outprob_c;
  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      if (en) dreg[k] <= {lut_data, feat[k]};
      dq[k] <= dist_addr[k];
    end
    if (en) outprob_q <= outprob_c;
  end
  always_comb
    for (int k = 0; k < 4; k++) dist_addr[k] = en ? dreg[k] : dq[k];

  outprob_addmux #(.BW(TW)) u_addmux (.mode(om_mode), .distp(dist_data), .outprob(outprob_c));

  // State memory flip.
  always_ff @(posedge clk) begin
    if (rst)             mem_sel <= 1'b0;
    else if (endframe11) mem_sel <= !mem_sel;
  end
  assign sp_row = sp_rdata[mem_sel];
  always_comb begin
    for (int m = 0; m < 2; m++) begin
      sp_addr[m]  = (m == int'(mem_sel)) ? row_addr : waddr[NSTAGE];
      sp_we[m]    = (m != int'(mem_sel)) && write11;
      sp_wdata[m] = {tag11, prob11};
    end
  end

  // Grammar interface FIFOs.
  gn_fifo #(.W(PW+TAGW), .DEPTH(FIFO_DEPTH), .FULL_MARGIN(3)) u_srcfifo (
    .clk, .rst, .push(src_push), .wdata(src_wdata), .pop(popsource),
    .rdata(src_head), .empty(src_empty), .full(src_full), .count(src_count));
  gn_fifo #(.W(PW+TAGW), .DEPTH(FIFO_DEPTH), .FULL_MARGIN(3)) u_dstfifo (
    .clk, .rst, .push(pushdest11), .wdata({gntag11, gnprob11}), .pop(dst_pop),
    .rdata(dst_rdata), .empty(dst_empty), .full(dst_full), .count(dst_count));

  viterbi_proc #(.OUTPROB_DELAY(3)) u_viterbi (
    .clk, .rst, .first_frame, .startframe, .memorystall, .full(dst_full), .empty(src_empty),
    .stprobin_data(sp_row[PW-1:0]), .predecessor_data(topo_data.pred),
    .firsttransprob_data(topo_data.trans1), .secontransprob_data(topo_data.trans2),
    .thirdtransprob_data(topo_data.trans3), .gntransprob_data(topo_data.gntrans),
    .gnselect(topo_data.gnselect), .morepred(topo_data.morepred),
    .dgnenable(topo_data.dgnenable), .eow(topo_data.eow), .eof(topo_data.eof),
    .srcndprob_data(src_head[PW-1:0]), .outprob_data(outprob_q),
    .prob11_out(prob11), .write11, .wordmin11_out, .framemin11_out,
    .gnprob11_out(gnprob11), .pushdest11, .pushdest13(), .endframe11, .eof10,
    .state(seq_state), .stall, .take, .startcounter, .newframe, .popsource,
    .gnselect2, .sela, .selb, .morepredmux7, .gndmux9, .newword9);

  backtrace_proc #(.TW_TAG(TAGW)) u_backtrace (
    .clk, .rst, .stall, .startcounter, .predecessor_data(topo_data.pred),
    .tagin_data(sp_row[PW+TAGW-1:PW]), .popsource, .srcndtag_data(src_head[PW+TAGW-1:PW]),
    .gnselect2, .sela, .selb, .morepredmux7, .gndmux9, .newword9,
    .tag11_out(tag11), .gntag11_out(gntag11));

  assign frame_done = endframe11;
  assign word_push  = pushdest11;
endmodule
