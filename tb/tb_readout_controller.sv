// tb_readout_controller: the bench plays the columns. Checks header word
// (chip ID, RBCO) after the chip readout token arrives, EOC token
// injection, hit words with encoded ADC in bus order without gaps, the end of
// the event when the token returns, done, token pass-through when idle,
// continuous mode without data sends nothing, triggered mode with no hits
// sends a header only.
module tb_readout_controller;
  import fpix1_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cont_mode = 1, chip_has_data = 0, rbco_valid = 1, chip_token_in = 0;
  logic eoc_token_return = 0, chip_bus_valid = 0;
  logic [BCO_W-1:0] rbco = 6'd17;
  logic [CHIP_ID_W-1:0] chip_id = 5'd21;
  chip_word_t chip_bus_word = '0;
  logic eoc_token, chip_token_out, dout_valid, busy, done;
  out_word_t dout;
  int checks = 0, failures = 0;

  readout_controller dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // one event with n hits; bus words appear from the clock after the header
  task automatic event_run(int n);
    chip_word_t w [16];
    int wait_tok;
    for (int k = 0; k < n; k++) w[k] = chip_word_t'($urandom);
    wait_tok = $urandom_range(0, 3);
    @(posedge clk); #1;                        // controller leaves idle
    check("busy", int'(busy), 1);
    check("no eoc token before chip token", int'(eoc_token), 0);
    repeat (wait_tok) begin @(posedge clk); #1; end
    check("still waiting", int'(eoc_token), 0);
    chip_token_in = 1; #1;
    check("token not passed while sending", int'(chip_token_out), 0);
    @(posedge clk); #1;                        // header state
    check("eoc token in header", int'(eoc_token), 1);
    eoc_token_return = n == 0;
    for (int k = 0; k <= n; k++) begin
      @(posedge clk); #1;
      if (k == 0) begin
        check("header valid", int'(dout_valid), 1);
        check("header", int'(dout), int'({1'b1, chip_id, 4'b0, rbco}));
      end else begin
        logic [1:0] code;
        code = w[k-1].cw.therm[2] ? 2'd3 : w[k-1].cw.therm[1] ? 2'd2 : w[k-1].cw.therm[0] ? 2'd1 : 2'd0;
        check("hit valid", int'(dout_valid), 1);
        check("hit word", int'(dout), int'({1'b0, w[k-1].col, w[k-1].cw.row, code}));
      end
      chip_bus_valid = k < n;
      chip_bus_word  = k < n ? w[k] : '0;
      eoc_token_return = k >= n - 1;
      if (k == n) begin chip_bus_valid = 0; chip_bus_word = '0; end
      if (k < n) check("eoc token held", int'(eoc_token), 1);
    end
    chip_bus_valid = 0; eoc_token_return = 0;
    check("done", int'(done), 1);
    check("eoc token withdrawn", int'(eoc_token), 0);
    chip_has_data = 0; chip_token_in = 0;
    @(posedge clk); #1;
    check("idle", int'(busy), 0);
    check("no extra word", int'(dout_valid), 0);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // idle, continuous, no data: token passes, nothing sent
    chip_token_in = 1; #1;
    check("token passes when idle", int'(chip_token_out), 1);
    repeat (5) begin @(posedge clk); #1; check("nothing sent", int'(dout_valid), 0); end
    chip_token_in = 0;
    for (int e = 0; e < 20; e++) begin
      rbco = BCO_W'($urandom);
      chip_has_data = 1;
      event_run($urandom_range(1, 12));
    end
    // triggered mode, empty event: header only
    cont_mode = 0; rbco_valid = 1;
    event_run(0);
    rbco_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
