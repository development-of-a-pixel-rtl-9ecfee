// tb_workload_btev: the BTeV innermost-chip load on a full-size FPIX1
// (160 x 18), continuous readout.
//
// Load: one crossing in four carries a track cluster of five pixels (the
// average for the innermost chip), i.e. 1.25 pixel hits per crossing; the
// cluster sits in one column, or spills into the next column at random. The
// readout clock runs at 4 clocks per crossing, a value assumed here
// (the readout clock frequency is left open). Every hit must come out exactly once, in an event whose
// header carries the crossing in which it was taken, with no hit lost.
// A second phase at about 2.5 times the load (12 pixels in one crossing of
// four, 3 hits per crossing, the rate this architecture is expected to
// sustain) is run at 4 and at 8 readout clocks per crossing and only reports
// how many hits were lost and the mean delay from hit to output. Ends with a
// TB_RESULT line; a watchdog fails the run if it hangs.
module tb_workload_btev;
  import fpix1_pkg::*;
  localparam int ROWS = 160, COLS = 18;
  int div = 4;
  localparam int NCROSS = 1500;

  logic clk = 0, rst_n = 0, bco_en;
  logic [Q_W-1:0] q_sensor [COLS][ROWS];
  logic [Q_W-1:0] adc_thr [ADC_CMP];
  logic ser_out, trig_ready, chip_token_out, dout_valid;
  out_word_t dout;
  logic [BCO_W-1:0] cbco, rbco;
  int checks = 0, failures = 0, cyc = 0;
  logic [BCO_W-1:0] xc = '0;

  fpix1_chip dut (
    .clk, .rst_n, .bco_en, .q_sensor, .q_test('0), .disc_thr(16'd2000), .adc_thr,
    .throttle(1'b0), .ext_trig(1'b0), .ext_rbco('0), .chip_token_in(1'b1),
    .ser_en(1'b0), .ser_in(1'b0), .ser_out, .trig_ready, .chip_token_out,
    .dout, .dout_valid, .cbco, .rbco, .test_amp(), .test_disc()
  );

  always #5 clk = ~clk;
  assign bco_en = rst_n && (cyc % div == div - 1);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bco_en) xc <= xc + 1'b1;
  end

  logic pend [COLS][ROWS];
  int   pend_bco [COLS][ROWS];
  int   pend_cyc [COLS][ROWS];
  int   n_in = 0, n_out = 0, n_cross_hit = 0, n_spill = 0;
  longint delay_sum = 0;
  int   cur_bco = -1;

  // monitor: every hit word must match a pending hit of the header's crossing
  always @(posedge clk) begin
    if (rst_n && dout_valid) begin
      if (dout[15]) cur_bco = int'(dout[5:0]);
      else begin
        int c, r;
        c = int'(dout[14:10]);
        r = int'(dout[9:2]);
        checks++;
        if (c >= COLS || r >= ROWS || !pend[c][r] || pend_bco[c][r] != cur_bco) begin
          failures++;
          $display("%t unexpected hit word col %0d row %0d in event %0d", $time, c, r, cur_bco);
        end else begin
          pend[c][r] = 0;
          n_out++;
          delay_sum += cyc - pend_cyc[c][r];
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic next_clk;
    @(posedge clk);
    #1;
  endtask

  // run n crossings, with a cluster of csize pixels in one crossing out of
  // every "every" crossings (chosen at random), then let the chip drain
  task automatic run_load(int n, int every, int csize);
    for (int i = 0; i < n; i++) begin
      do next_clk(); while (cyc % div != 1);
      if ($urandom_range(0, every - 1) == 0) begin
        int c, r0, k;
        bit spill;
        c = $urandom_range(0, COLS - 2);
        r0 = $urandom_range(0, ROWS - csize);
        spill = $urandom_range(0, 2) == 0;
        if (spill) n_spill++;
        n_cross_hit++;
        for (k = 0; k < csize; k++) begin
          int cc, rr;
          cc = (spill && k >= csize / 2) ? c + 1 : c;
          rr = r0 + k;
          if (!pend[cc][rr]) begin
            q_sensor[cc][rr] = Q_W'($urandom_range(2500, 30000));
            pend[cc][rr] = 1;
            pend_bco[cc][rr] = int'(xc);
            pend_cyc[cc][rr] = cyc;
            n_in++;
          end
        end
      end
      next_clk();
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++) q_sensor[c][r] = '0;
    end
    repeat (100 * div) next_clk();
  endtask

  initial begin
    int lost;
    adc_thr[0] = 16'd6000; adc_thr[1] = 16'd12000; adc_thr[2] = 16'd18000;
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin q_sensor[c][r] = '0; pend[c][r] = 0; end
    repeat (3) next_clk();
    rst_n = 1;
    // nominal load: 5 pixels in 1 crossing of 4
    run_load(NCROSS, 4, 5);
    checks++;
    if (n_out != n_in) begin
      failures++;
      $display("nominal load: %0d hits in, %0d out", n_in, n_out);
    end
    checks++;
    if (n_cross_hit == 0 || n_spill == 0) failures++;
    $display("nominal load: %0d crossings, %0d with a cluster (%0d over two columns), %0d hits, %0.2f hits per crossing, mean delay %0.1f readout clocks",
             NCROSS, n_cross_hit, n_spill, n_in, real'(n_in) / NCROSS, real'(delay_sum) / (n_out > 0 ? n_out : 1));
    // heavy load: 12 pixels in 1 crossing of 4 (3 per crossing), report only
    for (int d = 4; d <= 8; d += 4) begin
      div = d;
      n_in = 0; n_out = 0; delay_sum = 0;
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++) pend[c][r] = 0;
      run_load(NCROSS, 4, 12);
      lost = 0;
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++) if (pend[c][r]) lost++;
      $display("heavy load, %0d readout clocks per crossing: %0d hits in, %0d read, %0d never read, mean delay %0.1f readout clocks",
               div, n_in, n_out, lost, real'(delay_sum) / (n_out > 0 ? n_out : 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
