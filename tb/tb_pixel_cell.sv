// tb_pixel_cell: one pixel cell end to end: a charge during "look for data"
// makes a hit with the right ADC thermometer bits; "output" raises RFastOR and
// stops the token; with advance the cell drives row address and ADC bits for
// one clock and clears itself; a charge below threshold makes no hit;
// injected test charge makes a hit. The raw amplifier and discriminator
// outputs follow the charge.
module tb_pixel_cell;
  import fpix1_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [ROW_W-1:0] row_addr = 8'd77;
  logic [Q_W-1:0] q_sensor = '0, q_test = 16'd9000, disc_thr = 16'd2000;
  logic [Q_W-1:0] adc_thr [ADC_CMP];
  logic inj_en = 0, kill = 0, throttle = 0, token_in = 0, advance = 0;
  cmd_t cmd [N_SETS];
  logic token_out, hfast, rfast, bus_valid, disc;
  logic [Q_W-1:0] amp;
  col_word_t bus_word;
  int checks = 0, failures = 0;

  pixel_cell dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // Hit with charge q, then read it out; expect thermometer exp_t or no hit.
  task automatic one_hit(int q, logic expect_hit, logic [2:0] exp_t, logic inj);
    for (int s = 0; s < N_SETS; s++) cmd[s] = CMD_IDLE;
    cmd[3] = CMD_LOOK;
    q_sensor = Q_W'(q); inj_en = inj;
    #1;
    begin
      int qa;
      qa = q + (inj ? 9000 : 0);
      if (qa > 32000) qa = 32000;
      check("amp", int'(amp), qa);
      check("disc", int'(disc), int'(qa > 2000));
    end
    @(posedge clk); #1 q_sensor = '0; inj_en = 0;
    cmd[3] = CMD_IDLE;
    cmd[3] = CMD_OUTPUT; token_in = 1; #1;
    check("rfast", int'(rfast), int'(expect_hit));
    check("token stops", int'(token_out), int'(!expect_hit));
    @(posedge clk); #1;
    check("no read without advance", int'(bus_valid), 0);
    advance = 1;
    @(posedge clk); #1 advance = 0;
    check("bus_valid", int'(bus_valid), int'(expect_hit));
    check("bus_word", int'(bus_word), expect_hit ? int'({8'd77, exp_t}) : 0);
    check("rfast after read", int'(rfast), 0);
    check("token passes after read", int'(token_out), 1);
    @(posedge clk); #1;
    check("bus one clock", int'(bus_valid), 0);
    token_in = 0;
    cmd[3] = CMD_IDLE;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adc_thr[0] = 16'd6000; adc_thr[1] = 16'd12000; adc_thr[2] = 16'd18000;
    for (int s = 0; s < N_SETS; s++) cmd[s] = CMD_IDLE;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    one_hit(3000, 1, 3'b000, 0);
    one_hit(7000, 1, 3'b001, 0);
    one_hit(13000, 1, 3'b011, 0);
    one_hit(50000, 1, 3'b111, 0);
    one_hit(1500, 0, 3'b000, 0);
    one_hit(0, 1, 3'b001, 1);       // injected 9000 e-
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
