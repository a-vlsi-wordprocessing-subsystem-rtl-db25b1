// tb_wordproc_subsystem: end-to-end test of the word processing subsystem.
//
// Builds a small random vocabulary (a leading word plus NWORDS words of 5..12
// rows, some states spread over two rows, source-node rows, word-end rows),
// models the external memories (topology, lookup, distribution and the two
// state memories) and the grammar side of the FIFOs, and runs three frames:
// the first frame of an utterance, a normalised frame with a slow grammar
// consumer (destination FIFO fills up), and a frame with single-feature
// output probabilities. A reference model computes every state probability,
// tag, word-end result, word minimum and frame minimum independently, and the
// testbench compares them with what the subsystem wrote and pushed.
// It also counts the mechanisms (stalls for an empty source FIFO, for a full
// destination FIFO and for memorystall; multi-row states; source-node rows;
// saturation; the memory flip) and fails if one never happened. The top runs
// with its default parameters.
module tb_wordproc_subsystem;
  import wp_pkg::*;

  localparam int ADDR_W = 18;
  localparam int LUT_W  = 14;
  localparam int FEAT_W = 8;
  localparam int MAXROWS = 400;
  localparam int NWORDS  = 24;
  localparam int NFRAMES = 3;
  localparam logic [PW-1:0] WORST = '1;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, startframe, first_frame, memorystall;
  logic [2:0] om_mode;
  logic [FEAT_W-1:0] feat [4];
  logic frame_done, mem_sel;
  seq_state_t seq_state;
  logic [ADDR_W-1:0] row_addr;
  topo_row_t topo_data;
  logic [LUT_W-1:0] lut_data;
  logic [LUT_W+FEAT_W-1:0] dist_addr [4];
  logic [TW-1:0] dist_data [4];
  logic [ADDR_W-1:0] sp_addr [2];
  logic sp_we [2];
  logic [PW+TAGW-1:0] sp_wdata [2], sp_rdata [2];
  logic src_push, src_full, dst_pop, dst_empty, word_push, newframe, eof10;
  logic [PW+TAGW-1:0] src_wdata, dst_rdata;
  logic [PW-1:0] wordmin11_out, framemin11_out;

  wordproc_subsystem dut (.*);

  // ---------------- external memory models (one cycle latency) -------------
  topo_row_t topo_mem [MAXROWS];
  logic [PW+TAGW-1:0] spm0 [2**ADDR_W];
  logic [PW+TAGW-1:0] spm1 [2**ADDR_W];
  int nrows;

  function automatic logic [LUT_W-1:0] lut_f(input logic [ADDR_W-1:0] a);
    return LUT_W'((a * 37 + 11) % 1021);
  endfunction
  function automatic logic [TW-1:0] dist_f(input int k, input logic [LUT_W+FEAT_W-1:0] a);
    logic [31:0] h;
    h = (32'(a) * 32'd2654435761) ^ (32'(k) * 32'd40503);
    return TW'((h >> 11) % 81);
  endfunction

  always_ff @(posedge clk) begin
    topo_data <= (int'(row_addr) < nrows) ? topo_mem[row_addr] : '0;
    lut_data  <= lut_f(row_addr);
    for (int k = 0; k < 4; k++) dist_data[k] <= dist_f(k, dist_addr[k]);
    sp_rdata[0] <= spm0[sp_addr[0]];
    sp_rdata[1] <= spm1[sp_addr[1]];
    if (sp_we[0]) spm0[sp_addr[0]] <= sp_wdata[0];
    if (sp_we[1]) spm1[sp_addr[1]] <= sp_wdata[1];
  end

  // ---------------- vocabulary --------------------------------------------
  int word_of [MAXROWS];
  int nw;   // words including the leading one
  int off [MAXROWS][3];

  task automatic build_vocab();
    int r, L, j;
    r = 0;
    nw = NWORDS + 1;
    for (int w = 0; w < nw; w++) begin
      L = (w == 0) ? 3 : 5 + int'($urandom % 8);
      for (j = 0; j < L; j++) begin
        topo_row_t t;
        t = '0;
        word_of[r] = w;
        for (int k = 0; k < 3; k++) begin
          off[r][k] = (j == 0) ? 0 : int'($urandom % ((j < 15 ? j : 15) + 1));
          t.pred[(2-k)*OFFW +: OFFW] = OFFW'(-off[r][k]);
        end
        t.trans1 = TW'($urandom % 41);
        t.trans2 = TW'($urandom % 41);
        t.trans3 = TW'($urandom % 41);
        t.gntrans = TW'($urandom % 41);
        t.gnselect  = (w > 0) && (j == 0 || (j == 1 && $urandom % 3 == 0));
        t.morepred  = (w > 0) && (j >= 2) && ($urandom % 5 == 0);
        t.dgnenable = (j >= L - 2) || ($urandom % 10 == 0);
        if (w == nw - 1) t.eof = (j == L - 1);
        else             t.eow = (j == L - 2);
        topo_mem[r] = t;
        r++;
      end
    end
    nrows = r;
  endtask

  // ---------------- reference model ----------------------------------------
  function automatic logic [PW-1:0] sadd(input logic [PW-1:0] a, input logic [PW-1:0] b);
    int s;
    s = int'(a) + int'(b);
    return (s > int'(WORST)) ? WORST : PW'(s);
  endfunction

  logic [PW+TAGW-1:0] src_entry [NWORDS+1];
  logic [PW+TAGW-1:0] exp_mem [MAXROWS];
  logic [PW+TAGW-1:0] exp_push [NWORDS+1];
  logic [PW-1:0] exp_wordmin [NWORDS+1];
  logic [PW-1:0] exp_framemin, prev_framemin;
  int sat_events;

  task automatic model_frame(input bit ff, input logic [2:0] mode);
    logic [PW-1:0] v [3], s [3], best, p6, p7, p8, prevp8, wmin, gbest, cand, fmin;
    logic [TAGW-1:0] tg [3], tbest, t8, prevt8, gtag;
    logic [PW+TAGW-1:0] old;
    int sel, w, sum;
    logic [TW-1:0] b, dv [4];
    bit fa, fb, fc;
    for (int r = 0; r < nrows; r++) begin
      topo_row_t t;
      t = topo_mem[r];
      w = word_of[r];
      for (int k = 0; k < 3; k++) begin
        old = mem_sel ? spm1[r - off[r][k]] : spm0[r - off[r][k]];
        v[k]  = ff ? WORST : old[PW-1:0];
        tg[k] = old[PW+TAGW-1:PW];
      end
      if (t.gnselect) begin
        v[0]  = src_entry[w][PW-1:0];
        tg[0] = src_entry[w][PW+TAGW-1:PW];
      end
      s[0] = sadd(v[0], PW'(t.trans1));
      s[1] = sadd(v[1], PW'(t.trans2));
      s[2] = sadd(v[2], PW'(t.trans3));
      if (int'(v[0]) + int'(t.trans1) > int'(WORST)) sat_events++;
      if (int'(v[1]) + int'(t.trans2) > int'(WORST)) sat_events++;
      if (int'(v[2]) + int'(t.trans3) > int'(WORST)) sat_events++;
      fa = s[0] <= s[1]; fb = s[1] <= s[2]; fc = s[2] <= s[0];
      if (fa && !fc) sel = 0; else if (fb && !fa) sel = 1; else if (fc && !fb) sel = 2; else sel = 0;
      best = s[sel]; tbest = tg[sel];
      for (int k = 0; k < 4; k++) dv[k] = dist_f(k, {lut_f(ADDR_W'(r)), feat[k]});
      sum = int'(dv[0]) + int'(dv[1]) + int'(dv[2]) + int'(dv[3]);
      if (mode == 0) b = (sum > 255) ? 8'hff : TW'(sum); else b = dv[mode - 1];
      p6 = sadd(best, PW'(b));
      p7 = ff ? p6 : ((p6 > prev_framemin) ? p6 - prev_framemin : '0);
      if (t.morepred && prevp8 <= p7) begin p8 = prevp8; t8 = prevt8; end
      else begin p8 = p7; t8 = tbest; end
      exp_mem[r] = {t8, p8};
      prevp8 = p8; prevt8 = t8;
      // word-level minima
      cand = t.dgnenable ? sadd(p8, PW'(t.gntrans)) : WORST;
      if (r == 0 || word_of[r-1] != w) begin
        wmin = p7; gbest = cand; gtag = t8;
      end else begin
        if (p7 < wmin) wmin = p7;
        if (cand < gbest) begin gbest = cand; gtag = t8; end
      end
      if (w >= 1) begin
        if (w == 1 && word_of[r-1] == 0) fmin = p7;
        else if (p7 < fmin) fmin = p7;
      end
      if (r == nrows - 1 || word_of[r+1] != w) begin
        exp_push[w] = {gtag, gbest};
        exp_wordmin[w] = wmin;
      end
    end
    exp_framemin = fmin;
  endtask

  // ---------------- stimulus and checking ----------------------------------
  int checks = 0, failures = 0;
  int n_empty_stall = 0, n_full_stall = 0, n_memstall = 0, n_morepred = 0;
  int n_gnselect = 0, n_flip = 0, n_pushes = 0, n_norm_frames = 0, n_modeswitch = 0;
  int push_idx, pop_idx, frame_no, src_prob_pct, dst_pop_pct, mstall_pct;
  int wm_idx;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 3000) $display("FAIL %s", what);
    end
  endtask

  // grammar side of the FIFOs, memorystall
  always @(posedge clk) begin
    if (!rst) begin
      src_push <= 1'b0;
      dst_pop  <= 1'b0;
      if (!src_full && push_idx <= NWORDS && ($urandom % 100) < src_prob_pct) begin
        src_push  <= 1'b1;
        src_wdata <= src_entry[push_idx];
        push_idx  <= push_idx + 1;
      end
      if (!dst_empty && !dst_pop && ($urandom % 100) < dst_pop_pct) begin
        dst_pop <= 1'b1;
        pop_idx <= pop_idx + 1;
        check(dst_rdata == exp_push[pop_idx + 1],
              $sformatf("frame %0d dest entry %0d: got %h exp %h", frame_no, pop_idx + 1,
                        dst_rdata, exp_push[pop_idx + 1]));
      end
      memorystall <= (seq_state != S_IDLE) && (($urandom % 100) < mstall_pct);
    end
  end

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    if (seq_state == S_STALL_S0 || seq_state == S_STALL_S) n_empty_stall++;
    if (seq_state == S_STALL_D || seq_state == S_STALL_END) n_full_stall++;
    if (memorystall) n_memstall++;
    if (dut.take && topo_data.morepred) n_morepred++;
    if (dut.take && topo_data.gnselect) n_gnselect++;
    if (frame_done) n_flip++;
    if (word_push) n_pushes++;
    if (word_push) begin
      wm_idx++;
      check(wordmin11_out == exp_wordmin[wm_idx],
            $sformatf("frame %0d wordmin word %0d: got %0d exp %0d", frame_no, wm_idx,
                      wordmin11_out, exp_wordmin[wm_idx]));
    end
  end

  int cyc_start, stall_cycles;
  always @(posedge clk) if (dut.stall && seq_state != S_IDLE) stall_cycles++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; startframe = 0; first_frame = 1; memorystall = 0; om_mode = 0;
    src_push = 0; dst_pop = 0; src_wdata = '0;
    push_idx = 1; pop_idx = 0; src_prob_pct = 100; dst_pop_pct = 100; mstall_pct = 0;
    nrows = 0; sat_events = 0; prev_framemin = '0; wm_idx = 0;
    for (int k = 0; k < 4; k++) feat[k] = '0;
    for (int a = 0; a < 2**ADDR_W; a++) begin
      spm0[a] = {$urandom, $urandom};
      spm1[a] = {$urandom, $urandom};
    end
    build_vocab();
    repeat (4) @(posedge clk);
    rst = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      frame_no = f;
      first_frame = (f == 0);
      om_mode = (f == 2) ? 3'd2 : 3'd0;
      if (f == 2) n_modeswitch++;
      if (f >= 1) n_norm_frames++;
      for (int k = 0; k < 4; k++) feat[k] = FEAT_W'($urandom);
      for (int w = 1; w <= NWORDS; w++) src_entry[w] = {TAGW'($urandom), (w % 7 == 3) ? PW'(16383 - ($urandom % 40)) : PW'($urandom % 300)};
      model_frame(first_frame, om_mode);
      push_idx = 1; pop_idx = 0; wm_idx = 0;
      src_prob_pct = (f == 0) ? 100 : 15;
      dst_pop_pct  = (f == 1) ? 3 : 60;
      mstall_pct   = (f == 0) ? 0 : 4;
      @(posedge clk);
      cyc_start = $time / 10; stall_cycles = 0;
      startframe = 1;
      repeat (3) @(posedge clk);
      startframe = 0;
      @(posedge clk iff frame_done);
      // Rate: one row per cycle when nothing stalls.
      if (f == 0)
        check(($time / 10 - cyc_start) - stall_cycles <= nrows + 20,
              $sformatf("frame cycles %0d for %0d rows", $time / 10 - cyc_start - stall_cycles, nrows));
      dst_pop_pct = 100;
      repeat (5) @(posedge clk);
      wait (dst_empty);
      repeat (3) @(posedge clk);
      check(pop_idx == NWORDS, $sformatf("frame %0d: %0d destination entries", f, pop_idx));
      check(framemin11_out == exp_framemin,
            $sformatf("frame %0d framemin got %0d exp %0d", f, framemin11_out, exp_framemin));
      // the written memory is now the i-1 memory (mem_sel flipped)
      for (int r = 0; r < nrows; r++)
        check((mem_sel ? spm1[r] : spm0[r]) == exp_mem[r],
              $sformatf("frame %0d row %0d: got %h exp %h", f, r,
                        mem_sel ? spm1[r] : spm0[r], exp_mem[r]));
      prev_framemin = exp_framemin;
    end
    check(n_empty_stall > 0, "no stall on empty source FIFO");
    check(n_full_stall > 0,  "no stall on full destination FIFO");
    check(n_memstall > 0,    "no memorystall");
    check(n_morepred > 0,    "no multi-row state");
    check(n_gnselect > 0,    "no source-node row");
    check(n_flip == NFRAMES, "memory flips");
    check(sat_events > 0,    "no saturation");
    check(n_norm_frames > 0 && n_modeswitch > 0, "normalised frame / mode switch");
    $display("mechanisms: empty_stall=%0d full_stall=%0d memstall=%0d morepred=%0d gnselect=%0d flips=%0d pushes=%0d saturations=%0d",
             n_empty_stall, n_full_stall, n_memstall, n_morepred, n_gnselect, n_flip, n_pushes, sat_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
