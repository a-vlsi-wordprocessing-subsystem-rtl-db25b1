// tb_gn_fifo: the grammar interface FIFO. Random pushes and pops against a
// queue model, with pushes allowed while full is low only (as the grammar
// side and the controller do) and pops only while not empty. Checks the head
// entry (fall-through read), count, empty, and full = count >= depth - margin.
`timescale 1ns/1ps
module tb_gn_fifo;
  localparam int W = 32, DEPTH = 16, FULL_MARGIN = 3, AW = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst, push, pop, empty, full;
  logic [W-1:0] wdata, rdata;
  logic [AW:0]  count;

  gn_fifo dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_both = 0;
  logic [W-1:0] q [$];

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
    int pp, qp;
    rst = 1; push = 0; pop = 0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 6000; i++) begin
      // phases: filling, draining, mixed
      pp = ((i / 500) % 3 == 0) ? 80 : ((i / 500) % 3 == 1) ? 20 : 50;
      qp = 100 - pp;
      #1;
      check(int'(count) == q.size(), $sformatf("count %0d exp %0d", count, q.size()));
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() >= DEPTH - FULL_MARGIN), "full flag");
      if (q.size() > 0) check(rdata == q[0], $sformatf("head got %h exp %h", rdata, q[0]));
      if (full) n_full++;
      if (empty) n_empty++;
      push = !full && (($urandom % 100) < pp);
      pop = !empty && (($urandom % 100) < qp);
      if (push && pop) n_both++;
      wdata = W'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    check(n_full > 0 && n_empty > 0 && n_both > 0, "full, empty or simultaneous push/pop not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
