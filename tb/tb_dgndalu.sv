// tb_dgndalu: the word-end (destination) probability unit. Rows carry the
// grammar transition probability (stage 0, delayed on chip by eight cycles),
// the state probability (stage 8) and valid, dgnenable and newword (stage 9).
// With random stalls, checks gnprob9 = prob8 + gntrans (saturating) through
// the update flag gndmux9 and the running minimum gnprob10 over the rows of a
// word that may end the word (dgnenable), restarted by newword.
`timescale 1ns/1ps
module tb_dgndalu;
  import wp_pkg::*;
  localparam int NR = 4000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          en, valid9, dgnenable9, newword9, gndmux9;
  logic [TW-1:0] gntransprob_data;
  logic [PW-1:0] prob8_out, gnprob10_out;

  dgndalu dut (.*);

  int checks = 0, failures = 0, n, n_upd = 0, n_sat = 0;
  logic [TW-1:0] gt [NR];
  logic [PW-1:0] p8 [NR], g10 [NR];
  bit            vl [NR], dg [NR], nwd [NR], mux [NR];

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
      int s;
      logic [PW-1:0] cand;
      gt[r] = TW'($urandom);
      p8[r] = (($urandom % 10) == 0) ? PW'(PWORST - ($urandom % 100)) : PW'($urandom % 2000);
      vl[r] = (r == 0) || ($urandom % 8) != 0;
      dg[r] = ($urandom % 3) == 0;
      nwd[r] = (r == 0) || ($urandom % 8) == 0;
      s = int'(p8[r]) + int'(gt[r]);
      if (s > int'(PWORST)) begin s = int'(PWORST); n_sat++; end
      cand = dg[r] ? PW'(s) : PWORST;
      mux[r] = vl[r] && (nwd[r] || cand < g10[(r > 0) ? r - 1 : 0]);
      g10[r] = mux[r] ? cand : g10[r-1];
      if (mux[r] && !nwd[r]) n_upd++;
    end
    en = 0; gntransprob_data = '0; prob8_out = '0; valid9 = 0; dgnenable9 = 0; newword9 = 0;
    repeat (2) @(posedge clk);
    #1 n = 0;
    while (n < NR + 10) begin
      if (n < NR) gntransprob_data = gt[n];
      if (n >= 8 && n - 8 < NR) prob8_out = p8[n-8];
      if (n >= 9 && n - 9 < NR) begin valid9 = vl[n-9]; dgnenable9 = dg[n-9]; newword9 = nwd[n-9]; end
      en = ($urandom % 5) != 0;
      #1;
      if (n >= 9 && n - 9 < NR)
        check(gndmux9 == mux[n-9], $sformatf("row %0d gndmux9 got %0b exp %0b", n-9, gndmux9, mux[n-9]));
      if (n >= 10 && n - 10 < NR)
        check(gnprob10_out == g10[n-10], $sformatf("row %0d gnprob10 got %h exp %h", n-10, gnprob10_out, g10[n-10]));
      @(posedge clk); #1;
      if (en) n++;
    end
    check(n_upd > 0 && n_sat > 0, "in-word update or saturation not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
