// fpix1_bench.svh: stimulus, reference model and checks for an FPIX1 chip,
// shared by the chip-level and the top-level testbenches. Included inside a
// testbench module that declares the chip's port signals under the chip's
// port names (including the test-row outputs test_amp and test_disc of row 0),
// the sizes ROWS, COLS, DIV (readout clocks per crossing), NB
// (configuration bits), the chip ID ID and the watchdog limit WATCHDOG.

  int checks = 0, failures = 0;
  int cyc = 0, xabs = 0;
  logic [BCO_W-1:0] xc = '0;   // the bench's own crossing counter

  always #5 clk = ~clk;
  assign bco_en = rst_n && (cyc % DIV == DIV - 1);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bco_en) begin xc <= xc + 1'b1; xabs <= xabs + 1; end
  end

  typedef struct { int col; int row; int code; } hit_t;

  logic pend    [COLS][ROWS];   // pixel holds a hit not yet seen at the output
  logic killed  [COLS][ROWS];
  logic injsel  [COLS][ROWS];
  int   col_busy [COLS];        // crossings with unread hits, per column
  int   ev_left [64][COLS];     // unread words per crossing and column
  hit_t xhits   [64][$];        // hits taken in each crossing
  int   xtaken  [64];           // absolute crossing of xhits[b]
  bit   xtrig   [64];           // crossing was requested (triggered mode)
  out_word_t exp_q [$];
  bit   cfg_cont = 1;
  logic [BCO_W-1:0] cur_bco = '0;
  int   last_word_cyc = -10;

  // how often each mechanism happened
  int n_ev_cont = 0, n_ev_trig = 0, n_ev_empty = 0, n_reset = 0, n_lost = 0;
  int n_throttled = 0, n_killed = 0, n_injected = 0, n_multi_col = 0;
  int n_token_wait = 0, n_adc [4] = '{0, 0, 0, 0}, n_test_disc = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  function automatic int adc_code(int q);
    return int'(q > 6000) + int'(q > 12000) + int'(q > 18000);
  endfunction

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitor
  always @(posedge clk) begin
    if (rst_n && dout_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("%t unexpected word %h", $time, dout);
      end else begin
        out_word_t e;
        e = exp_q.pop_front();
        if (dout !== e) begin
          failures++;
          $display("%t word %h expected %h", $time, dout, e);
        end
      end
      if (dout[15]) cur_bco = dout[5:0];
      else begin
        int c, r;
        checks++;
        if (cyc != last_word_cyc + 1) begin
          failures++;
          $display("%t empty clock inside an event", $time);
        end
        c = int'(dout[14:10]);
        r = int'(dout[9:2]);
        if (c < COLS && r < ROWS) begin
          pend[c][r] = 0;
          ev_left[cur_bco][c]--;
          if (ev_left[cur_bco][c] == 0) col_busy[c]--;
        end
      end
      last_word_cyc = cyc;
    end
  end

  // test row (row 0): amplifier output is the clipped charge, discriminator
  // compares it with the threshold, both without regard to kill
  always @(negedge clk) begin
    if (rst_n && !ser_en)
      for (int c = 0; c < COLS; c++) begin
        int qa;
        qa = int'(q_sensor[c][0]) + (injsel[c][0] ? int'(q_test) : 0);
        if (qa > 32000) qa = 32000;
        check("test row amplifier", int'(test_amp[c]), qa);
        check("test row discriminator", int'(test_disc[c]), int'(qa > int'(disc_thr)));
        if (test_disc[c]) n_test_disc++;
      end
  end

  // ------------------------------------------------------------ utilities
  task automatic next_clk;
    @(posedge clk);
    #1;
  endtask

  task automatic wait_offset(int off);
    do next_clk(); while (cyc % DIV != off);
  endtask

  task automatic program_chip(bit cont, logic [BCO_W-1:0] mask);
    logic stream [NB];
    int p;
    p = 0;
    for (int b = CHIP_ID_W - 1; b >= 0; b--) stream[p++] = ID[b];
    stream[p++] = cont;
    for (int b = BCO_W - 1; b >= 0; b--) stream[p++] = mask[b];
    for (int c = COLS - 1; c >= 0; c--)
      for (int r = ROWS - 1; r >= 0; r--) begin
        stream[p++] = killed[c][r];
        stream[p++] = injsel[c][r];
      end
    for (int i = 0; i < NB; i++) begin
      ser_en = 1; ser_in = stream[i];
      next_clk();
    end
    ser_en = 0;
    cfg_cont = cont;
  endtask

  // Record the hits of crossing b (the list is sorted by column, then row).
  task automatic record(logic [BCO_W-1:0] b, hit_t hl [$]);
    int cnt [COLS];
    xhits[b] = hl;
    xtaken[b] = xabs;
    xtrig[b] = 0;
    for (int c = 0; c < COLS; c++) cnt[c] = 0;
    foreach (hl[i]) begin
      pend[hl[i].col][hl[i].row] = 1;
      cnt[hl[i].col]++;
      n_adc[hl[i].code]++;
    end
    for (int c = 0; c < COLS; c++) begin
      ev_left[b][c] = cnt[c];
      if (cnt[c] > 0) col_busy[c]++;
    end
  endtask

  task automatic expect_event(logic [BCO_W-1:0] b);
    hit_t hl [$];
    int ncol;
    hl = xhits[b];
    exp_q.push_back(make_header_word(ID, b));
    ncol = 0;
    foreach (hl[i]) begin
      exp_q.push_back(make_hit_word(COL_W'(hl[i].col), ROW_W'(hl[i].row), ADC_W'(hl[i].code)));
      if (i == 0 || hl[i].col != hl[i-1].col) ncol++;
    end
    if (ncol > 1) n_multi_col++;
  endtask

  // One crossing: random hits on up to nhits pixels (only_col >= 0 limits
  // them to one column), optionally throttled, or a test-charge injection.
  task automatic do_crossing(int nhits, bit thr, bit inj, int only_col = -1);
    hit_t hl [$];
    bit chosen [COLS][ROWS];
    int q [COLS][ROWS];
    bit colok [COLS];
    logic [BCO_W-1:0] b;
    wait_offset(2);
    b = xc;
    for (int c = 0; c < COLS; c++) begin
      colok[c] = col_busy[c] < 3 && (only_col < 0 || only_col == c);
      for (int r = 0; r < ROWS; r++) begin chosen[c][r] = 0; q[c][r] = 0; end
    end
    if (inj) begin
      q_test = 16'd10000;
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++)
          if (injsel[c][r] && !pend[c][r] && colok[c]) begin
            chosen[c][r] = 1;
            q[c][r] = 10000;
          end
    end else begin
      for (int k = 0; k < nhits; k++) begin
        int c, r;
        c = only_col >= 0 ? only_col : $urandom_range(0, COLS - 1);
        r = $urandom_range(0, ROWS - 1);
        if (colok[c] && !pend[c][r] && !chosen[c][r]) begin
          chosen[c][r] = 1;
          do q[c][r] = $urandom_range(2200, 31000);
          while ((q[c][r] % 6000) < 150 || (q[c][r] % 6000) > 5850);
          q_sensor[c][r] = Q_W'(q[c][r]);
        end
      end
    end
    throttle = thr;
    // expected result, in readout order
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++)
        if (chosen[c][r]) begin
          if (thr) n_throttled++;
          else if (killed[c][r]) n_killed++;
          else begin
            hit_t h;
            h.col = c; h.row = r; h.code = adc_code(q[c][r]);
            hl.push_back(h);
            if (inj) n_injected++;
          end
        end
    next_clk();
    throttle = 0;
    q_test = '0;
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) q_sensor[c][r] = '0;
    record(b, hl);
    if (cfg_cont && hl.size() > 0) begin
      expect_event(b);
      n_ev_cont++;
    end
  endtask

  task automatic drain;
    int n;
    n = 0;
    while ((exp_q.size() != 0 || n < 4 * DIV) && n < 400 * DIV) begin
      next_clk();
      n++;
    end
    check("output drained", exp_q.size(), 0);
  endtask

  // Triggered mode: free the pixels of unrequested crossings once the chip
  // must have reset them (masked delay 16 crossings, plus margin).
  task automatic reset_sweep;
    for (int b = 0; b < 64; b++)
      if (!xtrig[b] && xhits[b].size() > 0 && xabs - xtaken[b] >= 18) begin
        foreach (xhits[b][i]) pend[xhits[b][i].col][xhits[b][i].row] = 0;
        for (int c = 0; c < COLS; c++)
          if (ev_left[b][c] > 0) begin ev_left[b][c] = 0; col_busy[c]--; end
        xhits[b].delete();
        n_reset++;
      end
  endtask

  task automatic trigger(logic [BCO_W-1:0] b);
    int n;
    n = 0;
    while (!trig_ready && n < 100) begin next_clk(); n++; end
    check("trigger accepted", int'(trig_ready), 1);
    xtrig[b] = 1;
    if (xhits[b].size() == 0) n_ev_empty++; else n_ev_trig++;
    expect_event(b);
    xhits[b].delete();
    ext_rbco = b; ext_trig = 1;
    next_clk();
    ext_trig = 0;
  endtask

  // ------------------------------------------------------------- sequence
  task automatic run_all;
    adc_thr[0] = 16'd6000; adc_thr[1] = 16'd12000; adc_thr[2] = 16'd18000;
    for (int c = 0; c < COLS; c++) begin
      col_busy[c] = 0;
      for (int r = 0; r < ROWS; r++) begin
        q_sensor[c][r] = '0; pend[c][r] = 0;
        killed[c][r] = ($urandom_range(0, 99) < 5);
        injsel[c][r] = ($urandom_range(0, 99) < 5) && !killed[c][r];
      end
    end
    killed[0][1] = 1; injsel[0][2] = 1; injsel[COLS-1][ROWS-1] = 1; killed[COLS-1][ROWS-1] = 0;
    for (int b = 0; b < 64; b++) begin
      xtaken[b] = 0; xtrig[b] = 1;
      for (int c = 0; c < COLS; c++) ev_left[b][c] = 0;
    end
    repeat (3) next_clk();
    rst_n = 1;
    program_chip(1'b1, 6'b111111);
    check("chip token passes when idle", int'(chip_token_out), 1);

    // 1. continuous mode, random traffic
    for (int i = 0; i < 150; i++) begin
      if (i % 25 == 7)       do_crossing(3, 1, 0);
      else if (i % 40 == 11) do_crossing(0, 0, 1);
      else                   do_crossing($urandom_range(0, 1) == 0 ? 0 : $urandom_range(1, 6), 0, 0);
    end
    do_crossing(ROWS, 0, 0, 0);      // a full column
    drain();

    // 2. overflow: readout held off, six crossings hit column 1
    chip_token_in = 0;
    for (int i = 0; i < 6; i++) begin
      hit_t hl [$];
      hit_t h;
      logic [BCO_W-1:0] b;
      int r;
      wait_offset(2);
      b = xc;
      r = i;
      while (killed[1][r] || pend[1][r]) r++;
      q_sensor[1][r] = 16'd8000;
      next_clk();
      q_sensor[1][r] = '0;
      if (i < 4) begin
        h.col = 1; h.row = r; h.code = 1;
        hl.push_back(h);
        record(b, hl);
        expect_event(b);
        n_ev_cont++;
      end else begin
        n_lost++;
        xhits[b].delete();
      end
    end
    repeat (2 * DIV) next_clk();
    check("nothing sent without chip token", exp_q.size(), 8);
    if (exp_q.size() == 8) n_token_wait++;
    chip_token_in = 1;
    drain();

    // 3. triggered mode, reset delay 16 crossings
    program_chip(1'b0, 6'b001111);
    repeat (2 * DIV) next_clk();
    for (int b = 0; b < 64; b++) begin xhits[b].delete(); xtrig[b] = 1; end
    for (int i = 0; i < 120; i++) begin
      logic [BCO_W-1:0] old;
      do_crossing($urandom_range(0, 2) == 0 ? 0 : $urandom_range(1, 4), 0, 0);
      old = xc - 6'd4;
      if (i >= 4 && !xtrig[old] && $urandom_range(0, 99) < 55) trigger(old);
      reset_sweep();
    end
    repeat (20 * DIV) next_clk();
    reset_sweep();
    drain();
    // request a crossing long after it was reset: header only
    trigger(xc - 6'd30);
    drain();

    check("mechanism: continuous-mode event", int'(n_ev_cont > 0), 1);
    check("mechanism: event over several columns", int'(n_multi_col > 0), 1);
    check("mechanism: triggered event", int'(n_ev_trig > 0), 1);
    check("mechanism: empty triggered event", int'(n_ev_empty > 0), 1);
    check("mechanism: timestamp reset", int'(n_reset > 0), 1);
    check("mechanism: all EOC sets busy, hits lost", int'(n_lost > 0), 1);
    check("mechanism: throttle", int'(n_throttled > 0), 1);
    check("mechanism: killed pixel", int'(n_killed > 0), 1);
    check("mechanism: test-charge injection", int'(n_injected > 0), 1);
    check("mechanism: wait for chip readout token", int'(n_token_wait > 0), 1);
    for (int a = 0; a < 4; a++) check("mechanism: ADC code seen", int'(n_adc[a] > 0), 1);
    check("mechanism: test-row discriminator fired", int'(n_test_disc > 0), 1);
    $display("events: continuous %0d, triggered %0d, empty %0d; resets %0d; lost %0d; throttled %0d; killed %0d; injected %0d; multi-column %0d",
             n_ev_cont, n_ev_trig, n_ev_empty, n_reset, n_lost, n_throttled, n_killed, n_injected, n_multi_col);
  endtask
