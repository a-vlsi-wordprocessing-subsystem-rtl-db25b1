// tb_backtrace_proc: the tag (backtrace) processor. Rows carry a state tag and
// three offsets (stage 0); words begin with a source pop that supplies the
// word's entry tag, selected by gnselect at stage 2; the Viterbi side supplies
// the path select (stage 5), morepred keep (stage 7), word-end update (stage 9)
// and newword (stage 9). With random stalls, checks that tag11 is the tag of
// the chosen predecessor (or the kept earlier row's tag) eleven accepted
// cycles after the row, and that the word-end tag of a word is latched when
// the next word begins.
`timescale 1ns/1ps
module tb_backtrace_proc;
  import wp_pkg::*;
  localparam int NR = 4000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst, stall, startcounter, popsource, gnselect2, sela, selb;
  logic              morepredmux7, gndmux9, newword9;
  logic [3*OFFW-1:0] predecessor_data;
  logic [TAGW-1:0]   tagin_data, srcndtag_data, tag11_out, gntag11_out;

  backtrace_proc dut (.*);

  int checks = 0, failures = 0, n, n_keep = 0, n_gn = 0, n_word = 0;
  logic [TAGW-1:0] tg [NR], src [NR], T [NR], T8 [NR], GT [NR], GN [NR];
  logic [OFFW-1:0] off [NR][3];
  logic [1:0]      sl [NR];
  bit              first [NR], gs [NR], mp [NR], gm [NR];
  bit              popped;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 50) $display("FAIL %s", what); end
  endtask

  initial begin
    #400000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int left = 0, j = 0;
    logic [TAGW-1:0] a;
    for (int r = 0; r < NR; r++) begin
      if (left == 0) begin left = 3 + $urandom % 6; j = 0; end
      first[r] = (j == 0);
      src[r] = first[r] ? TAGW'($urandom) : src[r-1];
      gs[r] = (j == 0) || (j == 1 && ($urandom % 2) == 0);
      tg[r] = TAGW'($urandom);
      for (int k = 0; k < 3; k++) off[r][k] = (r < 16) ? OFFW'($urandom % (r + 1)) : OFFW'($urandom);
      sl[r] = 2'($urandom % 3);
      mp[r] = (j >= 1) && ($urandom % 4) == 0;
      gm[r] = first[r] || ($urandom % 3) == 0;
      a = gs[r] ? src[r] : tg[r - off[r][0]];
      T[r] = (sl[r] == 0) ? a : (sl[r] == 1) ? tg[r - off[r][1]] : tg[r - off[r][2]];
      T8[r] = mp[r] ? T8[r-1] : T[r];
      GT[r] = gm[r] ? T8[r] : GT[r-1];
      GN[r] = (first[r] && r > 0) ? GT[r-1] : (r > 0 ? GN[r-1] : '0);
      if (mp[r]) n_keep++;
      if (gs[r]) n_gn++;
      if (first[r]) n_word++;
      left--; j++;
    end
    rst = 1; stall = 1; startcounter = 0; popsource = 0; gnselect2 = 0; sela = 0; selb = 0;
    morepredmux7 = 0; gndmux9 = 0; newword9 = 0; predecessor_data = '0; tagin_data = '0; srcndtag_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0; stall = 0; startcounter = 1;
    @(posedge clk); #1;
    startcounter = 0; n = 0;
    while (n < NR + 11) begin
      stall = ($urandom % 5) == 0;
      if (n < NR) begin
        predecessor_data = {OFFW'(-off[n][0]), OFFW'(-off[n][1]), OFFW'(-off[n][2])};
        tagin_data = tg[n];
        popsource = first[n] && !stall;
        srcndtag_data = src[n];
      end else popsource = 0;
      if (n >= 2 && n - 2 < NR) gnselect2 = gs[n-2];
      if (n >= 5 && n - 5 < NR) {selb, sela} = sl[n-5];
      if (n >= 7 && n - 7 < NR) morepredmux7 = mp[n-7];
      if (n >= 9 && n - 9 < NR) begin gndmux9 = gm[n-9]; newword9 = first[n-9]; end
      #1;
      if (n >= 11 && n - 11 < NR)
        check(tag11_out == T8[n-11], $sformatf("row %0d tag11 got %h exp %h", n-11, tag11_out, T8[n-11]));
      if (n >= 10 && n - 10 < NR && n - 10 >= 8)
        check(gntag11_out == GN[n-10], $sformatf("row %0d gntag11 got %h exp %h", n-10, gntag11_out, GN[n-10]));
      @(posedge clk); #1;
      if (!stall) n++;
    end
    check(n_keep > 0 && n_gn > 0 && n_word > 0, "morepred, gnselect or word change not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
