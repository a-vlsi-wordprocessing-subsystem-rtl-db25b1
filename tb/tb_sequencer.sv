// tb_sequencer: the controller state machine, driven by a model of the
// topology memory (eow on the second-to-last row of each word, eof on the last
// row of the vocabulary) and of the two grammar FIFOs. Four frames: one with
// no stalls, then frames with an often-empty source FIFO, an often-full
// destination FIFO and random memory stalls. Checks per frame: every row is
// taken once and in order; the source is popped exactly on the first row of
// each real word and never when empty; one destination push per real word,
// on the third row of the following word or in the closing bubble, never when
// full; stall is high exactly in the stall states or on memorystall, and
// memorystall freezes the state; startframe leaves idle three edges later
// (two-flop synchronizer); and without stalls a frame of N rows takes exactly
// N + 3 cycles from state 1 back to idle (one row per cycle, three bubbles).
`timescale 1ns/1ps
module tb_sequencer;
  import wp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, startframe, memorystall, eow, eof, full, empty;
  seq_state_t state;
  logic stall, take, startcounter, newframe, popsource, newword, newframe_row, pushdest, endframe;

  sequencer dut (.*);

  int checks = 0, failures = 0;
  int nrows, nwords;
  int word_of [600];
  bit first_row [600], third_row [600];
  int row, src_cnt, dst_cnt, pops, pushes, cycles, rows_taken;
  int n_empty = 0, n_full = 0, n_mstall = 0;
  int src_pct, dst_pct, ms_pct;
  seq_state_t prev_state;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 50) $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // vocabulary: word 0 is the leading word, words 1..nwords the real words
  task automatic build(input int nw);
    int r = 0, L;
    nwords = nw;
    for (int w = 0; w <= nw; w++) begin
      L = (w == 0) ? 2 + $urandom % 3 : 5 + $urandom % 8;
      for (int j = 0; j < L; j++) begin
        word_of[r] = w;
        first_row[r] = (w >= 1) && (j == 0);
        third_row[r] = (w >= 2) && (j == 2);
        r++;
      end
    end
    nrows = r;
  endtask

  function automatic bit is_eow(input int r);
    return (word_of[r] != nwords) && (r + 2 < nrows) && (word_of[r+2] != word_of[r]) && (word_of[r+1] == word_of[r]);
  endfunction

  task automatic run_frame(input int sp, input int dp, input int mp, input bit exact);
    int t0;
    src_pct = sp; dst_pct = dp; ms_pct = mp;
    row = 0; pops = 0; pushes = 0; rows_taken = 0; cycles = 0;
    startframe = 1;
    for (int e = 1; e <= 3; e++) begin
      @(posedge clk); #1;
      if (e < 3) check(state == S_IDLE, "left idle before the synchronizer delay");
    end
    startframe = 0;
    check(state == S_STARTCNT, $sformatf("not in state 1 three edges after startframe (%0d)", state));
    t0 = 0;
    while (state != S_IDLE || t0 == 0) begin
      t0 = 1;
      cycles++;
      @(posedge clk); #1;
      if (cycles > 20000) break;
    end
    check(rows_taken == nrows, $sformatf("rows taken %0d of %0d", rows_taken, nrows));
    check(pops == nwords, $sformatf("pops %0d exp %0d", pops, nwords));
    check(pushes == nwords, $sformatf("pushes %0d exp %0d", pushes, nwords));
    if (exact) check(cycles == nrows + 3, $sformatf("frame took %0d cycles for %0d rows", cycles, nrows));
  endtask

  // inputs: topology flags of the current row, FIFO levels, memory stalls
  always_comb begin
    eow = (row < nrows) ? is_eow(row) : 1'b0;
    eof = (row == nrows - 1);
    empty = (src_cnt == 0);
    full = (dst_cnt >= 13);
  end

  always @(posedge clk) begin
    if (!rst) begin
      // checks on the cycle ending at this edge
      check(stall == ((state inside {S_STALL_S0, S_STALL_S, S_STALL_D, S_STALL_END}) || memorystall), "stall decode");
      if (take) begin
        check(first_row[row] == popsource, $sformatf("row %0d pop %0b", row, popsource));
        check(first_row[row] == newword, $sformatf("row %0d newword", row));
        check(!pushdest || third_row[row], $sformatf("row %0d unexpected push", row));
        check(!third_row[row] || pushdest, $sformatf("row %0d missing push", row));
        check(newframe == (row == first_word_row() - 1), $sformatf("row %0d newframe", row));
        check(newframe_row == (word_of[row] == 1 && first_row[row]), "newframe_row");
        row <= row + 1; rows_taken++;
      end else begin
        check(!popsource, "pop without a row");
      end
      if (popsource) begin check(src_cnt > 0, "pop while empty"); pops++; end
      if (pushdest) begin check(!full, "push while full"); pushes++; end
      check(endframe == (pushdest && !take), "endframe only with the closing push");
      if (stall && (state inside {S_STALL_S0, S_STALL_S})) n_empty++;
      if (stall && (state inside {S_STALL_D, S_STALL_END})) n_full++;
      if (memorystall) n_mstall++;
      prev_state <= state;
      src_cnt <= src_cnt - int'(popsource) + int'((src_cnt < 16) && (($urandom % 100) < src_pct));
      dst_cnt <= dst_cnt + int'(pushdest) - int'((dst_cnt > 0) && (($urandom % 100) < dst_pct));
      memorystall <= ($urandom % 100) < ms_pct;
    end
  end

  // memorystall freezes the state
  logic ms_d;
  seq_state_t st_d;
  always @(posedge clk) begin
    ms_d <= memorystall; st_d <= state;
    if (!rst && ms_d) check(state == st_d, "state changed during memorystall");
  end

  function automatic int first_word_row();
    for (int r = 0; r < nrows; r++) if (word_of[r] == 1) return r;
    return -1;
  endfunction

  initial begin
    rst = 1; startframe = 0; memorystall = 0; src_cnt = 16; dst_cnt = 0;
    src_pct = 0; dst_pct = 100; ms_pct = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (2) @(posedge clk); #1;
    build(20); run_frame(100, 100, 0, 1);
    build(30); run_frame(4, 100, 0, 0);
    build(40); run_frame(60, 4, 0, 0);
    build(30); run_frame(30, 30, 5, 0);
    check(n_empty > 0 && n_full > 0 && n_mstall > 0, "empty, full or memory stall not exercised");
    $display("empty_stall=%0d full_stall=%0d memstall=%0d", n_empty, n_full, n_mstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
