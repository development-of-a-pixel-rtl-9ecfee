// tb_chip_config: reset values, then a random configuration shifted in
// serially (first bit = chip ID MSB) at reduced array size; every field and
// every kill/inject bit is compared with the stream, and the scan-path
// output must replay the stream on a second pass.
module tb_chip_config;
  import fpix1_pkg::*;
  localparam int ROWS = 6, COLS = 5;
  localparam int NB = 2 * ROWS * COLS + BCO_W + 1 + CHIP_ID_W;
  logic clk = 0, rst_n = 0, ser_en = 0, ser_in = 0, ser_out;
  logic [CHIP_ID_W-1:0] chip_id;
  logic cont_mode;
  logic [BCO_W-1:0] reset_mask;
  logic kill [COLS][ROWS], inj_en [COLS][ROWS];
  logic stream [NB];
  int checks = 0, failures = 0;

  chip_config #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("reset id", int'(chip_id), 0);
    check("reset mode", int'(cont_mode), 1);
    check("reset mask", int'(reset_mask), 63);
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin
        check("reset kill", int'(kill[c][r]), 0);
        check("reset inj", int'(inj_en[c][r]), 0);
      end
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < NB; i++) stream[i] = $urandom_range(0, 1) == 1;
      for (int i = 0; i < NB; i++) begin
        ser_en = 1; ser_in = stream[i];
        @(posedge clk); #1;
      end
      ser_en = 0;
      // stream order: chip ID (MSB first), mode, mask (MSB first),
      // then pixels from the last (col COLS-1, row ROWS-1) down, kill then inject
      p = 0;
      for (int b = CHIP_ID_W - 1; b >= 0; b--) check("id bit", int'(chip_id[b]), int'(stream[p++]));
      check("mode", int'(cont_mode), int'(stream[p++]));
      for (int b = BCO_W - 1; b >= 0; b--) check("mask bit", int'(reset_mask[b]), int'(stream[p++]));
      for (int c = COLS - 1; c >= 0; c--)
        for (int r = ROWS - 1; r >= 0; r--) begin
          check("kill", int'(kill[c][r]), int'(stream[p++]));
          check("inj", int'(inj_en[c][r]), int'(stream[p++]));
        end
      // hold: no change without ser_en
      ser_in = ~ser_in;
      repeat (3) @(posedge clk);
      #1 check("hold", int'(ser_out), int'(stream[0]));
      // scan out while shifting the next pass in
      if (pass == 0)
        for (int i = 0; i < 4; i++) begin
          check("scan out", int'(ser_out), int'(stream[i]));
          ser_en = 1; ser_in = 0;
          @(posedge clk); #1;
        end
      ser_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
