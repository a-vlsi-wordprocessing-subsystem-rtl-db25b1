// tb_bidirmem: random writes and reads of the 16-entry predecessor cache
// against an array model. Checks that a written value is readable in the next
// cycle, that a read of the slot being written in the same cycle returns the
// old value, and that no write happens with we low.
`timescale 1ns/1ps
module tb_bidirmem;
  localparam int W = 14, DEPTH = 16, AW = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0, n_collide = 0;

  bidirmem dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 50) $display("FAIL %s", what); end
  endtask

  initial begin
    #200000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    we = 1; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      waddr = AW'(a); wdata = W'($urandom); model[a] = wdata; @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      we = ($urandom % 3) != 0;
      waddr = AW'($urandom); raddr = (($urandom % 4) == 0) ? waddr : AW'($urandom);
      wdata = W'($urandom);
      #1 check(rdata === model[raddr], $sformatf("read slot %0d got %h exp %h", raddr, rdata, model[raddr]));
      if (we && raddr == waddr) n_collide++;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
    end
    check(n_collide > 0, "no same-slot read/write cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
