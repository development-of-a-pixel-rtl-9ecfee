// tb_pixel_column: a 16-row column driven with command lines by the bench.
// Random hits with set 1 looking are read out with set 1 "output": the bus
// must show the hit rows in ascending order, one per clock, only while
// advance is high; RFastOR drops in the clock the last word is on the bus.
// Hits of set 2 are then cleared by "reset" and never read. The test row is
// set to row 5; its amplifier and discriminator outputs must follow that
// row's charge.
module tb_pixel_column;
  import fpix1_pkg::*;
  localparam int ROWS = 16, TEST_ROW = 5;
  logic clk = 0, rst_n = 0;
  logic [Q_W-1:0] q_sensor [ROWS];
  logic [Q_W-1:0] q_test = '0, disc_thr = 16'd2000;
  logic [Q_W-1:0] adc_thr [ADC_CMP];
  logic inj_en [ROWS], kill [ROWS];
  logic throttle = 0, col_token = 0, advance = 0;
  cmd_t cmd [N_SETS];
  logic token_out, hfast_or, rfast_or, bus_valid;
  col_word_t bus_word;
  logic [Q_W-1:0] test_amp;
  logic test_disc;
  int checks = 0, failures = 0;

  pixel_column #(.ROWS(ROWS), .TEST_ROW(TEST_ROW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  task automatic idle_all;
    for (int s = 0; s < N_SETS; s++) cmd[s] = CMD_IDLE;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adc_thr[0] = 16'd6000; adc_thr[1] = 16'd12000; adc_thr[2] = 16'd18000;
    for (int r = 0; r < ROWS; r++) begin q_sensor[r] = '0; inj_en[r] = 0; kill[r] = 0; end
    idle_all();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int iter = 0; iter < 30; iter++) begin
      logic [ROWS-1:0] hits, junk;
      int q [ROWS];
      int n_exp, r_exp;
      hits = ROWS'($urandom); junk = ROWS'($urandom) & ~hits;
      if (iter == 0) hits = '0;
      // crossing A: set 1 looks, hits recorded
      idle_all(); cmd[1] = CMD_LOOK;
      for (int r = 0; r < ROWS; r++) begin
        q[r] = $urandom_range(2500, 30000);
        q_sensor[r] = hits[r] ? Q_W'(q[r]) : '0;
      end
      #1 check("hfast", int'(hfast_or), int'(hits != 0));
      check("test_amp", int'(test_amp), hits[TEST_ROW] ? q[TEST_ROW] : 0);
      check("test_disc", int'(test_disc), int'(hits[TEST_ROW]));
      @(posedge clk); #1;
      for (int r = 0; r < ROWS; r++) q_sensor[r] = '0;
      // crossing B: set 2 looks, junk hits (to be reset)
      idle_all(); cmd[2] = CMD_LOOK;
      for (int r = 0; r < ROWS; r++) q_sensor[r] = junk[r] ? 16'd5000 : '0;
      @(posedge clk); #1;
      for (int r = 0; r < ROWS; r++) q_sensor[r] = '0;
      // reset set 2
      idle_all(); cmd[2] = CMD_RESET;
      @(posedge clk); #1;
      // output set 1
      idle_all(); cmd[1] = CMD_OUTPUT; col_token = 1; #1;
      check("rfast", int'(rfast_or), int'(hits != 0));
      @(posedge clk); #1;
      check("no read w/o advance", int'(bus_valid), 0);
      advance = 1;
      n_exp = $countones(hits);
      r_exp = 0;
      for (int k = 0; k < n_exp; k++) begin
        while (!hits[r_exp]) r_exp++;
        @(posedge clk); #1;
        check("bus_valid", int'(bus_valid), 1);
        check("row", int'(bus_word.row), r_exp);
        check("therm", int'(bus_word.therm),
              int'({q[r_exp] > 18000, q[r_exp] > 12000, q[r_exp] > 6000}));
        check("rfast until last", int'(rfast_or), int'(k != n_exp - 1));
        r_exp++;
      end
      @(posedge clk); #1;
      check("bus idle after", int'(bus_valid), 0);
      check("token through", int'(token_out), 1);
      advance = 0; col_token = 0;
      // junk must be gone: output on set 2 gives nothing
      idle_all(); cmd[2] = CMD_OUTPUT; #1;
      check("junk reset", int'(rfast_or), 0);
      idle_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
