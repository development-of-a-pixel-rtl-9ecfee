// tb_fpix0_readout: random hit patterns on a 6 x 3 array (with some pixels
// killed). The fast-OR follows the stored hits; with the token in, the
// addresses of the hit cells must appear in scan order (column by column,
// rows ascending), one per token-advance pulse; the token leaves the array
// after the last one.
module tb_fpix0_readout;
  localparam int ROWS = 6, COLS = 3;
  localparam int AW = $clog2(COLS) + $clog2(ROWS);
  logic clk = 0, rst_n = 0, token_in = 0, token_advance = 0;
  logic disc [COLS][ROWS], kill [COLS][ROWS];
  logic token_out, fast_or, addr_valid;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  fpix0_readout #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic stored [COLS][ROWS];
    int n;
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin disc[c][r] = 0; kill[c][r] = 0; stored[c][r] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int iter = 0; iter < 40; iter++) begin
      // hits
      n = 0;
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++) begin
          kill[c][r] = $urandom_range(0, 7) == 0;
          disc[c][r] = $urandom_range(0, 2) == 0;
          if (disc[c][r] && !kill[c][r]) stored[c][r] = 1;
        end
      @(posedge clk); #1;
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++) begin disc[c][r] = 0; if (stored[c][r]) n++; end
      check("fast_or", int'(fast_or), int'(n != 0));
      // read out
      token_in = 1;
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++)
          if (stored[c][r]) begin
            #1;
            check("addr_valid", int'(addr_valid), 1);
            check("addr", int'(addr), c * 8 + r);
            check("token inside", int'(token_out), 0);
            token_advance = 1;
            @(posedge clk); #1 token_advance = 0;
            stored[c][r] = 0;
          end
      #1;
      check("empty: no addr", int'(addr_valid), 0);
      check("token through", int'(token_out), 1);
      check("fast_or low", int'(fast_or), 0);
      token_in = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
