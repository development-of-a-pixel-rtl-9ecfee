// tb_pixel_bus_ctrl: token passing, read gating by token/request/advance and
// the one-clock bus word, over all input combinations.
module tb_pixel_bus_ctrl;
  import fpix1_pkg::*;
  logic clk = 0, rst_n = 0, req = 0, token_in = 0, advance = 0;
  logic [ROW_W-1:0] row_addr = '0;
  logic [ADC_CMP-1:0] adc = '0;
  logic token_out, read, bus_valid;
  col_word_t bus_word;
  int checks = 0, failures = 0;

  pixel_bus_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic exp_read;
      logic [ROW_W-1:0] r;
      logic [ADC_CMP-1:0] a;
      req = $urandom_range(0, 1) == 1;
      token_in = $urandom_range(0, 1) == 1;
      advance = $urandom_range(0, 1) == 1;
      r = ROW_W'($urandom); a = ADC_CMP'($urandom);
      row_addr = r; adc = a;
      #1;
      exp_read = token_in && req && advance;
      check("token_out", int'(token_out), int'(token_in && !req));
      check("read", int'(read), int'(exp_read));
      @(posedge clk); #1;
      check("bus_valid", int'(bus_valid), int'(exp_read));
      check("bus_word", int'(bus_word), exp_read ? int'({r, a}) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
