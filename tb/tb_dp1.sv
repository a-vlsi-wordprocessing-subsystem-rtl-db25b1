// tb_dp1: one predecessor data path. Rows carry a transition probability
// (stage 0), a cache value, an alternative value and its select (stage 2) and
// a compare operand (stage 4). With random stalls, checks that prob4 equals
// the saturating sum exactly at stage 4, that prob5 follows one cycle later,
// and that compresult is prob4 <= compin. Large inputs exercise saturation at
// the worst value.
`timescale 1ns/1ps
module tb_dp1;
  import wp_pkg::*;
  localparam int NR = 4000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          en, sel2, compresult;
  logic [TW-1:0] transprob_data;
  logic [PW-1:0] pred2_data, alt2_data, compin, prob4_out, prob5_out;

  dp1 dut (.*);

  int checks = 0, failures = 0, n, n_sat = 0, n_alt = 0;
  logic [TW-1:0] tr [NR];
  logic [PW-1:0] pv [NR], av [NR], cv [NR], e4 [NR];
  bit            sv [NR];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 50) $display("FAIL %s", what); end
  endtask

  function automatic logic [PW-1:0] big_or_small();
    return (($urandom % 4) == 0) ? PW'(PWORST - ($urandom % 300)) : PW'($urandom % 4000);
  endfunction

  initial begin
    #400000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int r = 0; r < NR; r++) begin
      int s;
      tr[r] = TW'($urandom); pv[r] = big_or_small(); av[r] = big_or_small();
      sv[r] = ($urandom % 3) == 0;
      s = int'(sv[r] ? av[r] : pv[r]) + int'(tr[r]);
      e4[r] = (s > int'(PWORST)) ? PWORST : PW'(s);
      if (s > int'(PWORST)) n_sat++;
      if (sv[r]) n_alt++;
      cv[r] = (($urandom % 2) == 0) ? e4[r] + PW'($urandom % 3) - PW'(1) : PW'($urandom);
    end
    en = 0; transprob_data = '0; pred2_data = '0; alt2_data = '0; sel2 = 0; compin = '0;
    repeat (2) @(posedge clk);
    #1 n = 0;
    while (n < NR + 5) begin
      transprob_data = (n < NR) ? tr[n] : '0;
      if (n >= 2 && n - 2 < NR) begin pred2_data = pv[n-2]; alt2_data = av[n-2]; sel2 = sv[n-2]; end
      if (n >= 4 && n - 4 < NR) compin = cv[n-4];
      en = ($urandom % 5) != 0;
      #1;
      if (n >= 4 && n - 4 < NR) begin
        check(prob4_out == e4[n-4], $sformatf("row %0d prob4 got %h exp %h", n-4, prob4_out, e4[n-4]));
        check(compresult == (e4[n-4] <= cv[n-4]), $sformatf("row %0d compresult", n-4));
      end
      if (n >= 5 && n - 5 < NR)
        check(prob5_out == e4[n-5], $sformatf("row %0d prob5", n-5));
      @(posedge clk); #1;
      if (en) n++;
    end
    check(n_sat > 0 && n_alt > 0, "saturation or alternative select not exercised");
    $display("saturations=%0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
