// tb_predcom: the three predecessor paths and their compare ring. Rows carry
// three transition probabilities (stage 0), three cache values, the source
// (grammar) probability with gnselect, and the new-sentence flag (stage 2).
// With random stalls, checks the three stage-5 sums (path 1 takes the source
// probability on gnselect, paths 2 and 3 take the worst value on new) and the
// stage-4 compare flags fisecom = p1<=p2, sethcom = p2<=p3, thficom = p3<=p1.
`timescale 1ns/1ps
module tb_predcom;
  import wp_pkg::*;
  localparam int NR = 4000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          en, new2, gnselect2, fisecom, sethcom, thficom;
  logic [PW-1:0] srcndprob2_data;
  logic [TW-1:0] firsttransprob_data, secontransprob_data, thirdtransprob_data;
  logic [PW-1:0] firstpred2_data, seconpred2_data, thirdpred2_data;
  logic [PW-1:0] firstprob5_out, seconprob5_out, thirdprob5_out;

  predcom dut (.*);

  int checks = 0, failures = 0, n, n_new = 0, n_gn = 0, n_tie = 0;
  logic [TW-1:0] tr [NR][3];
  logic [PW-1:0] pv [NR][3], src [NR], e [NR][3];
  bit            nw [NR], gs [NR];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 50) $display("FAIL %s", what); end
  endtask

  function automatic logic [PW-1:0] sadd(input logic [PW-1:0] a, input logic [TW-1:0] b);
    int s = int'(a) + int'(b);
    return (s > int'(PWORST)) ? PWORST : PW'(s);
  endfunction

  initial begin
    #400000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int r = 0; r < NR; r++) begin
      for (int k = 0; k < 3; k++) begin
        tr[r][k] = TW'($urandom % 16);
        pv[r][k] = (($urandom % 8) == 0) ? PW'(PWORST - ($urandom % 8)) : PW'(100 + $urandom % 24);
      end
      src[r] = PW'(100 + $urandom % 24);
      nw[r] = ($urandom % 6) == 0;
      gs[r] = ($urandom % 4) == 0;
      e[r][0] = sadd(gs[r] ? src[r] : pv[r][0], tr[r][0]);
      e[r][1] = sadd(nw[r] ? PWORST : pv[r][1], tr[r][1]);
      e[r][2] = sadd(nw[r] ? PWORST : pv[r][2], tr[r][2]);
      if (nw[r]) n_new++;
      if (gs[r]) n_gn++;
      if (e[r][0] == e[r][1] || e[r][1] == e[r][2]) n_tie++;
    end
    en = 0; new2 = 0; gnselect2 = 0; srcndprob2_data = '0;
    firsttransprob_data = '0; secontransprob_data = '0; thirdtransprob_data = '0;
    firstpred2_data = '0; seconpred2_data = '0; thirdpred2_data = '0;
    repeat (2) @(posedge clk);
    #1 n = 0;
    while (n < NR + 5) begin
      if (n < NR) begin
        firsttransprob_data = tr[n][0]; secontransprob_data = tr[n][1]; thirdtransprob_data = tr[n][2];
      end
      if (n >= 2 && n - 2 < NR) begin
        firstpred2_data = pv[n-2][0]; seconpred2_data = pv[n-2][1]; thirdpred2_data = pv[n-2][2];
        srcndprob2_data = src[n-2]; gnselect2 = gs[n-2]; new2 = nw[n-2];
      end
      en = ($urandom % 5) != 0;
      #1;
      if (n >= 4 && n - 4 < NR) begin
        check(fisecom == (e[n-4][0] <= e[n-4][1]), $sformatf("row %0d fisecom", n-4));
        check(sethcom == (e[n-4][1] <= e[n-4][2]), $sformatf("row %0d sethcom", n-4));
        check(thficom == (e[n-4][2] <= e[n-4][0]), $sformatf("row %0d thficom", n-4));
      end
      if (n >= 5 && n - 5 < NR) begin
        check(firstprob5_out == e[n-5][0], $sformatf("row %0d first got %h exp %h", n-5, firstprob5_out, e[n-5][0]));
        check(seconprob5_out == e[n-5][1], $sformatf("row %0d second", n-5));
        check(thirdprob5_out == e[n-5][2], $sformatf("row %0d third", n-5));
      end
      @(posedge clk); #1;
      if (en) n++;
    end
    check(n_new > 0 && n_gn > 0 && n_tie > 0, "new, gnselect or ties not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
