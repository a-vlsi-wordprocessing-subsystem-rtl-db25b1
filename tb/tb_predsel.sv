// tb_predsel: the three predecessor caches, driven by the address unit
// (predadd) as in the processor. Each row carries a random state probability
// and three random offsets (0..15). With random stalls, checks that at stage 2
// (two accepted cycles after the row was at the inputs) each cache output
// equals the probability of the row `offset` rows earlier, including offset 0
// (the row itself), or the worst value when first_frame was set for that row.
`timescale 1ns/1ps
module tb_predsel;
  import wp_pkg::*;
  localparam int NR = 4000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic            rst, en, startcounter, first_frame;
  logic [PW-1:0]   stprobin_data;
  logic [3*OFFW-1:0] predecessor_data;
  logic [OFFW-1:0] writeadd_data, firstpredadd2, seconpredadd2, thirdpredadd2;
  logic [PW-1:0]   firstpred2_data, seconpred2_data, thirdpred2_data;

  predadd u_adr (.clk, .rst, .en, .startcounter, .predecessor_data,
                 .writeadd_data, .firstpredadd2, .seconpredadd2, .thirdpredadd2);
  predsel dut (.*);

  int checks = 0, failures = 0, n, n_ff = 0, n_self = 0, n_far = 0;
  logic [PW-1:0]   v [NR];
  logic [OFFW-1:0] off [NR][3];
  bit              ffv [NR];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 50) $display("FAIL %s", what); end
  endtask

  function automatic logic [PW-1:0] expv(input int r, input int k);
    int src = r - int'(off[r][k]);
    return ffv[src] ? PWORST : v[src];
  endfunction

  initial begin
    #400000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int r = 0; r < NR; r++) begin
      v[r] = PW'($urandom);
      ffv[r] = (r / 500) % 3 == 1;
      for (int k = 0; k < 3; k++) off[r][k] = (r < 16) ? OFFW'($urandom % (r + 1)) : OFFW'($urandom);
    end
    rst = 1; en = 0; startcounter = 0; predecessor_data = '0; stprobin_data = '0; first_frame = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0; startcounter = 1; en = 1;
    @(posedge clk); #1;
    startcounter = 0; n = 0;
    while (n < NR + 2) begin
      if (n < NR) begin
        predecessor_data = {OFFW'(-off[n][0]), OFFW'(-off[n][1]), OFFW'(-off[n][2])};
        stprobin_data = v[n];
        first_frame = ffv[n];
      end
      en = ($urandom % 5) != 0;
      #1;
      if (n >= 2 && n - 2 < NR) begin
        check(firstpred2_data == expv(n-2, 0), $sformatf("row %0d first got %h exp %h", n-2, firstpred2_data, expv(n-2, 0)));
        check(seconpred2_data == expv(n-2, 1), $sformatf("row %0d second", n-2));
        check(thirdpred2_data == expv(n-2, 2), $sformatf("row %0d third", n-2));
        if (ffv[n-2]) n_ff++;
        if (off[n-2][0] == 0) n_self++;
        if (off[n-2][0] == 15) n_far++;
      end
      @(posedge clk); #1;
      if (en) n++;
    end
    check(n_ff > 0 && n_self > 0 && n_far > 0, "first_frame, offset 0 or offset 15 not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
