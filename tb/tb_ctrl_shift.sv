// tb_ctrl_shift: the data-stationary control pipeline. A random control word
// enters with each accepted row; with random stalls, checks that tap k shows
// the word of the row k accepted cycles back, that tap 0 is the input itself,
// and that reset clears every stage.
`timescale 1ns/1ps
module tb_ctrl_shift;
  import wp_pkg::*;
  localparam int DEPTH = 13, NR = 3000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic  rst, en;
  ctrl_t c0;
  ctrl_t cs [DEPTH+1];

  ctrl_shift dut (.*);

  int checks = 0, failures = 0, n;
  ctrl_t rows [NR];

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
    for (int r = 0; r < NR; r++) rows[r] = ctrl_t'($urandom);
    rst = 1; en = 1; c0 = ctrl_t'('1);
    @(posedge clk); #1;
    for (int k = 1; k <= DEPTH; k++) check(cs[k] == '0, $sformatf("tap %0d not reset", k));
    rst = 0; n = 0;
    while (n < NR) begin
      c0 = rows[n];
      en = ($urandom % 4) != 0;
      #1;
      for (int k = 0; k <= DEPTH; k++)
        if (n - k >= 0) check(cs[k] == rows[n-k], $sformatf("row %0d tap %0d", n - k, k));
      @(posedge clk); #1;
      if (en) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
