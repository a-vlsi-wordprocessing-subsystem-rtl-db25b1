// wp_pkg: widths, the control word and the sequencer state encoding shared by
// the word processing subsystem.
//
// Probabilities are stored as absolute values of their logarithm, so a small
// number is a likely event: products become additions and "best" becomes
// "minimum". Model probabilities (transition A, output B) use 8 bits and state
// probabilities 14 bits, as the design description gives them. The tag width
// (18) is this design's choice: the state memory word is 32 bits and holds a
// 14-bit probability next to the backtrace tag.
//
// ctrl_t is the data-stationary control word: it is generated once, with the
// topology row it belongs to, and travels down the pipeline beside the data.
package wp_pkg;

  localparam int PW   = 14;            // state probability width
  localparam int TW   = 8;             // transition / output probability width
  localparam int OFFW = 4;             // predecessor offset width (16-entry caches)
  localparam int TAGW = 18;            // backtrace tag width (32 - PW)
  localparam int NSTAGE = 11;          // pipeline depth of the Viterbi processor

  localparam logic [PW-1:0] PWORST = '1;  // log value of "probability zero"

  // Control word carried with each row through the pipeline.
  typedef struct packed {
    logic valid;      // a topology row (not a bubble)
    logic gnselect;   // first predecessor is the source grammar node
    logic newword;    // first row of a word (or the closing bubble of a frame)
    logic newframe;   // first row that counts for the frame minimum
    logic morepred;   // row continues the state of the previous row
    logic dgnenable;  // state may end the word
    logic eof;        // last row of the vocabulary
    logic pushdest;   // push the finished destination node result
    logic endframe;   // last control event of a frame
  } ctrl_t;

  // One topology memory word.
  typedef struct packed {
    logic [3*OFFW-1:0] pred;       // offsets of first [11:8], second [7:4], third [3:0]
    logic [TW-1:0]     trans1;     // A(first pred, s)
    logic [TW-1:0]     trans2;     // A(second pred, s)
    logic [TW-1:0]     trans3;     // A(third pred, s)
    logic [TW-1:0]     gntrans;    // transition to the destination grammar node
    logic              gnselect;
    logic              dgnenable;
    logic              morepred;
    logic              eow;        // second-to-last row of a word
    logic              eof;        // last row of the vocabulary
  } topo_row_t;

  // Sequencer states, numbered as in the state diagram.
  typedef enum logic [3:0] {
    S_IDLE      = 4'd0,
    S_STARTCNT  = 4'd1,
    S_STALL_S0  = 4'd2,
    S_POP0      = 4'd3,
    S_PROC      = 4'd4,
    S_SCHK      = 4'd5,
    S_STALL_S   = 4'd6,
    S_POP       = 4'd7,
    S_DCHK      = 4'd8,
    S_STALL_D   = 4'd9,
    S_PUSH      = 4'd10,
    S_DCHK_END  = 4'd11,
    S_STALL_END = 4'd12,
    S_PUSH_END  = 4'd13,
    S_WAITEOW   = 4'd14,
    S_NEWFRAME  = 4'd15
  } seq_state_t;

  // Saturating addition: a result that does not fit becomes PWORST.
  function automatic logic [PW-1:0] sat_add(input logic [PW-1:0] a, input logic [PW-1:0] b);
    logic [PW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[PW] ? PWORST : s[PW-1:0];
  endfunction

  // Subtraction floored at zero.
  function automatic logic [PW-1:0] sat_sub(input logic [PW-1:0] a, input logic [PW-1:0] b);
    return (a > b) ? a - b : '0;
  endfunction

endpackage
