// tb_outprob_addmux: output probability formation. Random feature
// distribution values, biased toward large ones so that the sum saturates.
// Checks mode 0 (sum of the four values, limited to 255) and modes 1-4 (one
// feature passed through), plus the unused codes 5-7 which behave as mode 0.
`timescale 1ns/1ps
module tb_outprob_addmux;
  localparam int BW = 8;
  logic [2:0]    mode;
  logic [BW-1:0] distp [4];
  logic [BW-1:0] outprob;

  outprob_addmux dut (.*);

  int checks = 0, failures = 0, n_sat = 0, n_exact = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 50) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int s, e;
      mode = 3'($urandom);
      for (int k = 0; k < 4; k++) distp[k] = (($urandom % 2) == 0) ? BW'($urandom % 64) : BW'($urandom);
      s = 0;
      for (int k = 0; k < 4; k++) s += int'(distp[k]);
      if (mode >= 1 && mode <= 4) e = int'(distp[mode - 1]);
      else begin
        e = (s > 255) ? 255 : s;
        if (s > 255) n_sat++;
        if (s == 255) n_exact++;
      end
      #1 check(int'(outprob) == e, $sformatf("mode %0d got %0d exp %0d", mode, outprob, e));
    end
    // boundary: sum exactly 255 and 256
    mode = 0; distp = '{8'd255, 8'd0, 8'd0, 8'd0};
    #1 check(outprob == 8'd255, "sum 255");
    distp = '{8'd128, 8'd128, 8'd0, 8'd0};
    #1 check(outprob == 8'd255, "sum 256 must saturate");
    distp = '{8'd255, 8'd255, 8'd255, 8'd255};
    #1 check(outprob == 8'd255, "largest sum");
    check(n_sat > 0, "saturation not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
