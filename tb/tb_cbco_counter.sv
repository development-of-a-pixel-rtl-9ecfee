// tb_cbco_counter: the crossing counter advances only on bco_en and wraps
// at 64.
module tb_cbco_counter;
  import fpix1_pkg::*;
  logic clk = 0, rst_n = 0, bco_en = 0;
  logic [BCO_W-1:0] cbco;
  int checks = 0, failures = 0, n = 0;

  cbco_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      bco_en = $urandom_range(0, 2) == 0;
      @(posedge clk);
      if (bco_en) n++;
      #1;
      checks++;
      if (cbco !== BCO_W'(n % 64)) begin
        failures++;
        $display("cbco=%0d expected %0d", cbco, n % 64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
