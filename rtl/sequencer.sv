// sequencer: the finite state machine of the Viterbi processor controller.
//
// Sixteen states, numbered as in the design's state diagram:
//   0 idle -(startframe)-> 1 startcounter -> 14 (rows of the leading word until
//   eow) -> 15 newframe (last row of the leading word; is the source FIFO
//   empty?) -> 2 stall while empty -> 3 pop source, first row of word 1 -> 4.
//   Inner loop, once per word: 4 process rows until eow (or eof) -> 5 last row,
//   source FIFO empty? -> 6 stall while empty -> 7 pop source, first row of the
//   next word -> 8 second row, destination FIFO full? -> 9 stall while full ->
//   10 third row, push the previous word's destination result -> 4.
//   End of frame: 4 -(eof)-> 11 destination FIFO full? -> 12 stall while full
//   -> 13 push the last word's result -> 0.
// The leading word gets no source probability and no destination push.
//
// Outputs are Moore-style decodes of the state, qualified by stall:
//   take     - the row at the inputs enters the pipeline this cycle
//   stall    - every pipeline register holds (stall states or memorystall)
//   newword / newframe_row / pushdest / endframe - control bits for the row
//   (or bubble) entering the pipeline this cycle.
// The state graph is the design's; which states take rows, the leading word
// and the closing bubble (state 11 carries newword so that the last word's
// results are latched) are this implementation's reading of it.
// startframe is asynchronous to the clock and passes a two-flop synchronizer.
module sequencer import wp_pkg::*; (
  input  logic       clk,
  input  logic       rst,
  input  logic       startframe,
  input  logic       memorystall,
  input  logic       eow,
  input  logic       eof,
  input  logic       full,
  input  logic       empty,
  output seq_state_t state,
  output logic       stall,
  output logic       take,
  output logic       startcounter,
  output logic       newframe,
  output logic       popsource,
  output logic       newword,
  output logic       newframe_row,
  output logic       pushdest,
  output logic       endframe
);
  logic [1:0] sf_sync;
  logic       fsm_stall;
  seq_state_t nxt;

  always_ff @(posedge clk) begin
    if (rst) sf_sync <= '0;
    else     sf_sync <= {sf_sync[0], startframe};
  end

  always_comb begin
    nxt = state;
    unique case (state)
      S_IDLE:      if (sf_sync[1]) nxt = S_STARTCNT;
      S_STARTCNT:  nxt = S_WAITEOW;
      S_WAITEOW:   if (eow) nxt = S_NEWFRAME;
      S_NEWFRAME:  nxt = empty ? S_STALL_S0 : S_POP0;
      S_STALL_S0:  if (!empty) nxt = S_POP0;
      S_POP0:      nxt = S_PROC;
      S_PROC:      if (eof) nxt = S_DCHK_END; else if (eow) nxt = S_SCHK;
      S_SCHK:      nxt = empty ? S_STALL_S : S_POP;
      S_STALL_S:   if (!empty) nxt = S_POP;
      S_POP:       nxt = S_DCHK;
      S_DCHK:      nxt = full ? S_STALL_D : S_PUSH;
      S_STALL_D:   if (!full) nxt = S_PUSH;
      S_PUSH:      nxt = S_PROC;
      S_DCHK_END:  nxt = full ? S_STALL_END : S_PUSH_END;
      S_STALL_END: if (!full) nxt = S_PUSH_END;
      S_PUSH_END:  nxt = S_IDLE;
      default:     nxt = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)               state <= S_IDLE;
    else if (!memorystall) state <= nxt;
  end

  assign fsm_stall = (state == S_STALL_S0) || (state == S_STALL_S) ||
                     (state == S_STALL_D)  || (state == S_STALL_END);
  assign stall     = fsm_stall || memorystall;

  always_comb begin
    unique case (state)
      S_WAITEOW, S_NEWFRAME, S_POP0, S_PROC, S_SCHK, S_POP, S_DCHK, S_PUSH: take = !stall;
      default: take = 1'b0;
    endcase
  end

  assign startcounter = (state == S_STARTCNT) && !stall;
  assign newframe     = (state == S_NEWFRAME) && !stall;
  assign popsource    = (state == S_POP0 || state == S_POP) && !stall;
  assign newword      = (state == S_POP0 || state == S_POP || state == S_DCHK_END) && !stall;
  assign newframe_row = (state == S_POP0) && !stall;
  assign pushdest     = (state == S_PUSH || state == S_PUSH_END) && !stall;
  assign endframe     = (state == S_PUSH_END) && !stall;
endmodule
