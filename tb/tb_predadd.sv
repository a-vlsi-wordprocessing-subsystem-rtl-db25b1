// tb_predadd: the cache address unit. Rows with random offsets are presented
// with random pipeline stalls. Checks that the write slot advances by one per
// accepted row and restarts at 0 after startcounter (the first row after it
// takes slot 1), and that each row's three
// read addresses equal its own slot minus its offsets exactly two accepted
// cycles after the row was at the inputs (stage 2).
`timescale 1ns/1ps
module tb_predadd;
  localparam int AW = 4, NR = 3000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst, en, startcounter;
  logic [3*AW-1:0] predecessor_data;
  logic [AW-1:0] writeadd_data, firstpredadd2, seconpredadd2, thirdpredadd2;

  predadd dut (.*);

  int checks = 0, failures = 0, n, n_stall = 0, n_restart = 0, first_row = 0;
  logic [AW-1:0] off [NR][3];
  logic [AW-1:0] slot [NR];
  logic [AW-1:0] exp_slot;

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
    for (int r = 0; r < NR; r++) for (int k = 0; k < 3; k++) off[r][k] = AW'($urandom);
    rst = 1; en = 0; startcounter = 0; predecessor_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0; startcounter = 1; en = 1;
    @(posedge clk); #1;
    startcounter = 0; n = 0; exp_slot = AW'(1);
    check(writeadd_data == '0, "slot not cleared by startcounter");
    while (n < NR) begin
      // row n at the inputs, offsets stored negated as in the topology memory
      predecessor_data = {AW'(-off[n][0]), AW'(-off[n][1]), AW'(-off[n][2])};
      en = ($urandom % 5) != 0;
      if (!en) n_stall++;
      @(posedge clk); #1;
      if (en) begin
        // row n now in stage 1: its slot is the write address
        slot[n] = writeadd_data;
        check(writeadd_data == exp_slot, $sformatf("row %0d slot %0d exp %0d", n, writeadd_data, exp_slot));
        exp_slot++;
        if (n - 1 >= first_row) begin
          check(firstpredadd2 == AW'(slot[n-1] - off[n-1][0]), $sformatf("row %0d first address", n-1));
          check(seconpredadd2 == AW'(slot[n-1] - off[n-1][1]), $sformatf("row %0d second address", n-1));
          check(thirdpredadd2 == AW'(slot[n-1] - off[n-1][2]), $sformatf("row %0d third address", n-1));
        end
        n++;
      end
      // occasional frame restart
      if (n > 10 && n < NR - 10 && ($urandom % 500) == 0) begin
        en = 0; startcounter = 1; predecessor_data = '0;
        @(posedge clk); #1;
        startcounter = 0;
        check(writeadd_data == '0, "slot not cleared by startcounter");
        exp_slot = AW'(1); n_restart++; first_row = n;
      end
    end
    check(n_stall > 0, "no stall cycle");
    $display("stalls=%0d restarts=%0d", n_stall, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
