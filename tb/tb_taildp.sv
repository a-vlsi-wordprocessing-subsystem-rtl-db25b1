// tb_taildp: the output registers of the Viterbi processor. Rows carry the
// state probability and the word and frame minima (stage 8), newword
// (stage 9), the word-end probability and eof (stage 10). With random stalls,
// checks that prob11 is prob8 three accepted cycles later, that the word
// minimum and word-end probability of a word are latched when the next
// word's first row reaches stage 9, and that the frame minimum is latched
// by the eof row.
`timescale 1ns/1ps
module tb_taildp;
  import wp_pkg::*;
  localparam int NR = 4000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          en, newword9, eof10;
  logic [PW-1:0] prob8_out, wordmin8_out, framemin8_out, gnprob10_out;
  logic [PW-1:0] prob11_out, wordmin11_out, framemin11_out, gnprob11_out;

  taildp dut (.*);

  int checks = 0, failures = 0, n, n_word = 0, n_eof = 0;
  logic [PW-1:0] p8 [NR], w8 [NR], f8 [NR], g10 [NR], W11 [NR], G11 [NR], F11 [NR];
  bit            nwd [NR], eof [NR];

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
    for (int r = 0; r < NR; r++) begin
      p8[r] = PW'($urandom); w8[r] = PW'($urandom); f8[r] = PW'($urandom); g10[r] = PW'($urandom);
      nwd[r] = (r == 1) || ($urandom % 6) == 0;
      eof[r] = (r == 0) || ($urandom % 100) == 0;
    end
    for (int r = 0; r < NR - 1; r++) begin
      W11[r] = nwd[r+1] ? w8[r]  : W11[r-1];
      G11[r] = nwd[r+1] ? g10[r] : G11[r-1];
      F11[r] = eof[r]   ? f8[r]  : F11[r-1];
      if (nwd[r+1]) n_word++;
      if (eof[r]) n_eof++;
    end
    en = 0; newword9 = 0; eof10 = 0;
    prob8_out = '0; wordmin8_out = '0; framemin8_out = '0; gnprob10_out = '0;
    repeat (2) @(posedge clk);
    #1 n = 0;
    while (n < NR + 11) begin
      if (n >= 8 && n - 8 < NR) begin prob8_out = p8[n-8]; wordmin8_out = w8[n-8]; framemin8_out = f8[n-8]; end
      if (n >= 9 && n - 9 < NR) newword9 = nwd[n-9];
      if (n >= 10 && n - 10 < NR) begin gnprob10_out = g10[n-10]; eof10 = eof[n-10]; end
      en = ($urandom % 5) != 0;
      #1;
      if (n >= 11 && n - 11 < NR - 1) begin
        check(prob11_out == p8[n-11], $sformatf("row %0d prob11", n-11));
        check(wordmin11_out == W11[n-11], $sformatf("row %0d wordmin11 got %h exp %h", n-11, wordmin11_out, W11[n-11]));
        check(gnprob11_out == G11[n-11], $sformatf("row %0d gnprob11", n-11));
        check(framemin11_out == F11[n-11], $sformatf("row %0d framemin11", n-11));
      end
      @(posedge clk); #1;
      if (en) n++;
    end
    check(n_word > 0 && n_eof > 0, "word or frame latch not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
