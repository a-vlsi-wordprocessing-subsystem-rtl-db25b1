// tb_viterbi_proc: the complete Viterbi processor (controller, predecessor
// caches, data paths, word-end unit, output registers) fed from row arrays
// standing in for the topology and state memories, with the output
// probability supplied three cycles after its row. Two frames: a first frame
// (all old probabilities worst, only source-entered paths finite) without
// stalls, then the same vocabulary with memory stalls. Checks that every row
// is written once and in order, that the write of a row comes exactly eleven
// accepted cycles after the row was taken (and, without stalls, eleven clock
// cycles), that one row is taken per cycle inside a word, and the first-frame
// result of every row.
`timescale 1ns/1ps
module tb_viterbi_proc;
  import wp_pkg::*;
  localparam int MAXR = 400;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, first_frame, startframe, memorystall, full, empty;
  logic [PW-1:0] stprobin_data, srcndprob_data;
  logic [3*OFFW-1:0] predecessor_data;
  logic [TW-1:0] firsttransprob_data, secontransprob_data, thirdtransprob_data, gntransprob_data, outprob_data;
  logic gnselect, morepred, dgnenable, eow, eof;
  logic [PW-1:0] prob11_out, wordmin11_out, framemin11_out, gnprob11_out;
  logic write11, pushdest11, pushdest13, endframe11, eof10;
  seq_state_t state;
  logic stall, take, startcounter, newframe, popsource;
  logic gnselect2, sela, selb, morepredmux7, gndmux9, newword9;

  viterbi_proc dut (.*);

  int checks = 0, failures = 0;
  topo_row_t topo [MAXR];
  logic [PW-1:0] sp [MAXR], src [64], expv [MAXR];
  logic [TW-1:0] op [MAXR];
  int word_of [MAXR];
  int nrows, nwords, row, popped, wrow, n;
  int hist [100000];       // row at the inputs at accepted edge k (-1 = bubble)
  int take_cycle [MAXR], cyc, ms_pct, n_ms = 0, max_run = 0, run = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 50) $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic build();
    int r = 0, L;
    nwords = 20;
    for (int w = 0; w <= nwords; w++) begin
      L = (w == 0) ? 3 : 5 + $urandom % 6;
      for (int j = 0; j < L; j++) begin
        topo_row_t t;
        t = '0;
        for (int k = 0; k < 3; k++) t.pred[4*(2-k) +: 4] = OFFW'(-int'($urandom % ((j < 2) ? j + 1 : 3)));
        t.trans1 = TW'($urandom % 40); t.trans2 = TW'($urandom % 40); t.trans3 = TW'($urandom % 40);
        t.gntrans = TW'($urandom % 40);
        t.gnselect = (w >= 1) && (j == 0);
        t.morepred = (w >= 1) && (j >= 2) && ($urandom % 5) == 0;
        t.dgnenable = (j >= L - 2);
        if (w == nwords) t.eof = (j == L - 1); else t.eow = (j == L - 2);
        topo[r] = t; word_of[r] = w;
        sp[r] = PW'($urandom % 1000);
        op[r] = TW'($urandom % 60);
        r++;
      end
    end
    nrows = r;
    for (int w = 1; w <= nwords; w++) src[w] = PW'($urandom % 200);
    // first-frame result: only path 1 of a gnselect row is finite
    for (int r2 = 0; r2 < nrows; r2++) begin
      int s;
      logic [PW-1:0] p7;
      s = topo[r2].gnselect ? int'(src[word_of[r2]]) + int'(topo[r2].trans1) : int'(PWORST);
      if (s > int'(PWORST)) s = int'(PWORST);
      s = s + int'(op[r2]);
      if (s > int'(PWORST)) s = int'(PWORST);
      p7 = PW'(s);
      expv[r2] = (topo[r2].morepred && expv[r2-1] <= p7) ? expv[r2-1] : p7;
    end
  endtask

  // row inputs
  always_comb begin
    topo_row_t t;
    t = topo[(row < nrows) ? row : nrows - 1];
    predecessor_data = t.pred;
    firsttransprob_data = t.trans1; secontransprob_data = t.trans2; thirdtransprob_data = t.trans3;
    gntransprob_data = t.gntrans; gnselect = t.gnselect; morepred = t.morepred; dgnenable = t.dgnenable;
    eow = t.eow; eof = t.eof && (row < nrows);
    stprobin_data = sp[(row < nrows) ? row : nrows - 1];
    srcndprob_data = src[popped + 1];
    outprob_data = (n >= 3 && hist[n-3] >= 0) ? op[hist[n-3]] : '0;
  end

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (take) begin
        take_cycle[row] = cyc;
        row <= row + 1;
        run <= run + 1;
        if (run + 1 > max_run) max_run <= run + 1;
      end else run <= 0;
      if (popsource) popped <= popped + 1;
      if (write11) begin
        int r;
        r = hist[n-11];
        check(r == wrow, $sformatf("write of row %0d, expected row %0d", r, wrow));
        if (first_frame) check(prob11_out == expv[wrow], $sformatf("row %0d got %h exp %h", wrow, prob11_out, expv[wrow]));
        if (ms_pct == 0) check(cyc - take_cycle[wrow] == 11, $sformatf("row %0d latency %0d cycles", wrow, cyc - take_cycle[wrow]));
        wrow <= wrow + 1;
      end
      if (!stall) begin
        hist[n] <= take ? row : -1;
        n <= n + 1;
      end
      if (memorystall) n_ms++;
      memorystall <= ($urandom % 100) < ms_pct;
    end
  end

  task automatic frame(input bit ff, input int mpct);
    int guard = 0;
    first_frame = ff; ms_pct = mpct;
    row = 0; popped = 0; wrow = 0;
    startframe = 1;
    repeat (3) @(posedge clk);
    #1 startframe = 0;
    while (!(endframe11) && guard < 20000) begin @(posedge clk); #1; guard++; end
    repeat (3) @(posedge clk); #1;
    check(row == nrows, $sformatf("rows taken %0d of %0d", row, nrows));
    check(wrow == nrows, $sformatf("rows written %0d of %0d", wrow, nrows));
  endtask

  initial begin
    rst = 1; first_frame = 1; startframe = 0; memorystall = 0; full = 0; empty = 0;
    n = 0; cyc = 0; ms_pct = 0; row = 0; popped = 0; wrow = 0;
    build();
    repeat (3) @(posedge clk);
    #1 rst = 0;
    frame(1, 0);
    check(max_run >= 10, $sformatf("longest run of consecutive rows %0d", max_run));
    frame(1, 10);
    check(n_ms > 0, "memory stall not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
