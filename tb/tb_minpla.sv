// tb_minpla: the minimum decoder. Three values (with many ties) give the
// three compare flags at stage 4; the registered select must name a path
// holding the minimum at stage 5, one accepted cycle later, and must hold
// while en is low. Three equal values pick the first path. The flag pattern 000,
// which consistent values cannot produce, must decode to the first path.
`timescale 1ns/1ps
module tb_minpla;
  localparam int NR = 3000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en, fisecom, sethcom, thficom, sela, selb;

  minpla dut (.*);

  int checks = 0, failures = 0, n, n_all = 0, n_bad = 0;
  int va [NR][3];
  bit bad [NR];

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
      for (int k = 0; k < 3; k++) va[r][k] = $urandom % 3;
      bad[r] = ($urandom % 20) == 0;
    end
    en = 0; fisecom = 0; sethcom = 0; thficom = 0;
    @(posedge clk); #1 n = 0;
    while (n < NR + 1) begin
      if (n < NR) begin
        if (bad[n]) {fisecom, sethcom, thficom} = 3'b000;
        else begin
          fisecom = va[n][0] <= va[n][1];
          sethcom = va[n][1] <= va[n][2];
          thficom = va[n][2] <= va[n][0];
        end
      end
      en = ($urandom % 4) != 0;
      #1;
      if (n >= 1 && n - 1 < NR) begin
        int r, pick, mn, first_min;
        r = n - 1;
        check(!(sela && selb), "code 11 produced");
        pick = selb ? 2 : sela ? 1 : 0;
        if (bad[r]) begin
          check(pick == 0, $sformatf("row %0d flags 000 decoded to %0d", r, pick));
          n_bad++;
        end else begin
          mn = va[r][0]; first_min = 0;
          for (int k = 2; k >= 0; k--) if (va[r][k] <= mn) begin mn = va[r][k]; first_min = k; end
          check(va[r][pick] == mn, $sformatf("row %0d picked %0d not a minimum", r, pick));
          if (va[r][0] == va[r][1] && va[r][1] == va[r][2]) begin
            check(pick == 0, "all equal must pick the first path"); n_all++;
          end
        end
      end
      @(posedge clk); #1;
      if (en) n++;
    end
    check(n_all > 0 && n_bad > 0, "tie or 000 case not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
