// tb_outmindp: output probability add, normalisation and the word and frame
// minima. Rows carry an output probability (stage 3, as it arrives from the
// distribution memories), three path sums and the path select (stage 5), the
// new flag and the previous frame minimum (stage 6), and valid, morepred,
// newword and newframe (stage 7). With random stalls, checks prob8 (stage 8):
// sum + output probability, saturating, minus the old minimum floored at 0,
// except on morepred rows where the earlier row's value is kept when it is
// not worse; and the running word and frame minima of the valid rows.
`timescale 1ns/1ps
module tb_outmindp;
  import wp_pkg::*;
  localparam int NR = 4000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          en, new6, sela, selb, valid7, morepred7, newword7, newframe7, morepredmux7;
  logic [PW-1:0] firstprob5_out, seconprob5_out, thirdprob5_out, oldmin6_out;
  logic [TW-1:0] outprob_data;
  logic [PW-1:0] prob8_out, wordmin8_out, framemin8_out;

  outmindp dut (.*);

  int checks = 0, failures = 0, n, n_keep = 0, n_floor = 0, n_sat = 0;
  logic [PW-1:0] p5 [NR][3], om [NR], p7 [NR], p8 [NR], wm [NR], fm [NR];
  logic [TW-1:0] op [NR];
  logic [1:0]    sl [NR];
  bit            nw6 [NR], vl [NR], mp [NR], nwd [NR], nfr [NR];

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
      int s, c;
      for (int k = 0; k < 3; k++)
        p5[r][k] = (($urandom % 10) == 0) ? PW'(PWORST - ($urandom % 100)) : PW'(200 + $urandom % 400);
      sl[r] = 2'($urandom % 3);
      op[r] = TW'($urandom);
      om[r] = PW'($urandom % 500);
      nw6[r] = ($urandom % 8) == 0;
      vl[r] = (r == 0) || ($urandom % 8) != 0;
      nwd[r] = (r == 0) || ($urandom % 7) == 0;
      nfr[r] = (r == 0) || ($urandom % 200) == 0;
      mp[r] = (r > 0) && ($urandom % 4) == 0;
      // row reference
      c = (sl[r] == 0) ? int'(p5[r][0]) : (sl[r] == 1) ? int'(p5[r][1]) : int'(p5[r][2]);
      s = c + int'(op[r]);
      if (s > int'(PWORST)) begin s = int'(PWORST); n_sat++; end
      if (!nw6[r]) begin
        if (s <= int'(om[r])) n_floor++;
        s = (s > int'(om[r])) ? s - int'(om[r]) : 0;
      end
      p7[r] = PW'(s);
      if (mp[r] && p8[r-1] <= p7[r]) begin p8[r] = p8[r-1]; n_keep++; end
      else p8[r] = p7[r];
      wm[r] = (r > 0) ? wm[r-1] : '0;
      fm[r] = (r > 0) ? fm[r-1] : '0;
      if (vl[r] && (nwd[r] || p7[r] < wm[r])) wm[r] = p7[r];
      if (vl[r] && (nfr[r] || p7[r] < fm[r])) fm[r] = p7[r];
    end
    en = 0; new6 = 0; sela = 0; selb = 0; valid7 = 0; morepred7 = 0; newword7 = 0; newframe7 = 0;
    firstprob5_out = '0; seconprob5_out = '0; thirdprob5_out = '0; oldmin6_out = '0; outprob_data = '0;
    repeat (2) @(posedge clk);
    #1 n = 0;
    while (n < NR + 8) begin
      if (n >= 3 && n - 3 < NR) outprob_data = op[n-3];
      if (n >= 5 && n - 5 < NR) begin
        {firstprob5_out, seconprob5_out, thirdprob5_out} = {p5[n-5][0], p5[n-5][1], p5[n-5][2]};
        {selb, sela} = sl[n-5];
      end
      if (n >= 6 && n - 6 < NR) begin new6 = nw6[n-6]; oldmin6_out = om[n-6]; end
      if (n >= 7 && n - 7 < NR) begin
        valid7 = vl[n-7]; morepred7 = mp[n-7]; newword7 = nwd[n-7]; newframe7 = nfr[n-7];
      end
      en = ($urandom % 5) != 0;
      #1;
      if (n >= 8 && n - 8 < NR) begin
        int r;
        r = n - 8;
        check(prob8_out == p8[r], $sformatf("row %0d prob8 got %h exp %h", r, prob8_out, p8[r]));
        check(wordmin8_out == wm[r], $sformatf("row %0d wordmin got %h exp %h", r, wordmin8_out, wm[r]));
        check(framemin8_out == fm[r], $sformatf("row %0d framemin", r));
        if (r + 1 < NR)
          check(morepredmux7 == (mp[r+1] && p8[r] <= p7[r+1]), $sformatf("row %0d morepredmux", r + 1));
      end
      @(posedge clk); #1;
      if (en) n++;
    end
    check(n_keep > 0 && n_floor > 0 && n_sat > 0, "morepred keep, floor or saturation not exercised");
    $display("keep=%0d floor=%0d sat=%0d", n_keep, n_floor, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
