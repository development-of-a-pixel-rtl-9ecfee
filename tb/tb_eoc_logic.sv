// tb_eoc_logic: end-of-column logic with a 16-row pixel column. Hits in four
// consecutive crossings go to the four EOC sets; hits in a fifth crossing,
// while all sets are busy, are lost. Each stored crossing is then requested
// through RBCO and must come out on the chip bus as exactly its hit rows,
// ascending, one per clock, tagged with the column number; the EOC token is
// held while reading and passed on otherwise. Finally an unread hit is reset
// after the masked delay and a later request finds nothing.
module tb_eoc_logic;
  import fpix1_pkg::*;
  localparam int ROWS = 16, DIV = 4;
  logic clk = 0, rst_n = 0, bco_en;
  logic [BCO_W-1:0] cbco = '0, rbco = '0, reset_mask = '1;
  logic rbco_valid = 0, eoc_token_in = 0;
  logic [COL_W-1:0] col_addr = 5'd13;
  logic [Q_W-1:0] q_sensor [ROWS];
  logic [Q_W-1:0] q_test = '0, disc_thr = 16'd2000;
  logic [Q_W-1:0] adc_thr [ADC_CMP];
  logic inj_en [ROWS], kill [ROWS];
  cmd_t cmd [N_SETS];
  logic hfast, rfast, col_bus_valid, col_token, advance, eoc_token_out, col_has_data, chip_bus_valid;
  col_word_t col_bus_word;
  chip_word_t chip_bus_word;
  int checks = 0, failures = 0, cyc = 0;

  pixel_column #(.ROWS(ROWS)) u_col (
    .clk, .rst_n, .q_sensor, .q_test, .inj_en, .kill, .disc_thr, .adc_thr,
    .throttle(1'b0), .cmd, .col_token, .advance, .token_out(),
    .hfast_or(hfast), .rfast_or(rfast), .bus_valid(col_bus_valid), .bus_word(col_bus_word),
    .test_amp(), .test_disc()
  );
  eoc_logic dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bco_en) cbco <= cbco + 1'b1;
  end
  assign bco_en = rst_n && (cyc % DIV == DIV - 1);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // hits in the second clock of the next crossing; returns its number
  task automatic hit_crossing(logic [ROWS-1:0] rows, output logic [BCO_W-1:0] stamp);
    do @(posedge clk); while (!(cyc % DIV == 1));
    #1;
    stamp = cbco;
    for (int r = 0; r < ROWS; r++) q_sensor[r] = rows[r] ? 16'd4000 : '0;
    @(posedge clk); #1;
    for (int r = 0; r < ROWS; r++) q_sensor[r] = '0;
  endtask

  task automatic request(logic [BCO_W-1:0] b, logic [ROWS-1:0] rows);
    int n, r;
    n = $countones(rows);
    rbco = b; rbco_valid = 1; #1;
    check("col_has_data", int'(col_has_data), int'(n != 0));
    @(posedge clk); #1;                     // set enters output
    eoc_token_in = 1; #1;
    check("token held", int'(eoc_token_out), int'(n == 0));
    r = 0;
    for (int k = 0; k < n; k++) begin
      while (!rows[r]) r++;
      @(posedge clk); #1;
      check("bus valid", int'(chip_bus_valid), 1);
      check("bus row", int'(chip_bus_word.cw.row), r);
      check("bus col", int'(chip_bus_word.col), 13);
      check("token released with last word", int'(eoc_token_out), int'(k == n - 1));
      r++;
    end
    eoc_token_in = 0; rbco_valid = 0;
    @(posedge clk); #1;
    check("bus idle", int'(chip_bus_valid), 0);
    check("done", int'(col_has_data), 0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BCO_W-1:0] st [5];
    logic [ROWS-1:0] hr [5];
    adc_thr[0] = 16'd6000; adc_thr[1] = 16'd12000; adc_thr[2] = 16'd18000;
    for (int r = 0; r < ROWS; r++) begin q_sensor[r] = '0; inj_en[r] = 0; kill[r] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      logic [ROWS-1:0] used;
      used = 16'h001f;                      // rows 0..4: one sure hit per crossing
      for (int i = 0; i < 5; i++) begin
        // a pixel already holding a hit cannot take another, so each
        // crossing uses rows no earlier crossing used
        hr[i] = (ROWS'($urandom) & ~used) | ROWS'(1 << i);
        used |= hr[i];
        hit_crossing(hr[i], st[i]);
      end
      for (int i = 0; i < 4; i++) request(st[i], hr[i]);
      request(st[4], '0);                   // fifth crossing was lost
    end
    // masked reset: compare 2 bits -> reset 4 crossings after the hit
    reset_mask = 6'b000011;
    hit_crossing(16'h0106, st[0]);
    repeat (6 * DIV) @(posedge clk);
    #1 request(st[0], '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
