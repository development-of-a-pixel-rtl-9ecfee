// tb_eoc_token_bus_ctrl: all input combinations of the column token / EOC
// token logic and the column-tagged bus word.
module tb_eoc_token_bus_ctrl;
  import fpix1_pkg::*;
  logic out_active, rfast, eoc_token_in, col_bus_valid;
  logic [COL_W-1:0] col_addr;
  col_word_t col_bus_word;
  logic col_token, advance, eoc_token_out, chip_bus_valid;
  chip_word_t chip_bus_word;
  int checks = 0, failures = 0;

  eoc_token_bus_ctrl dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic hold;
      {out_active, rfast, eoc_token_in, col_bus_valid} = 4'(i);
      col_addr = COL_W'($urandom);
      col_bus_word = col_word_t'($urandom);
      #1;
      hold = out_active && rfast;
      check("col_token", int'(col_token), int'(out_active));
      check("advance", int'(advance), int'(eoc_token_in && hold));
      check("eoc_token_out", int'(eoc_token_out), int'(eoc_token_in && !hold));
      check("chip_bus_valid", int'(chip_bus_valid), int'(col_bus_valid));
      check("chip_bus_word", int'(chip_bus_word),
            col_bus_valid ? int'({col_addr, col_bus_word}) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
