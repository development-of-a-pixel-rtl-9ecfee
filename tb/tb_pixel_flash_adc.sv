// tb_pixel_flash_adc: random capture/clear/comparator sequences compared
// with a reference model of the set-reset flip-flops.
module tb_pixel_flash_adc;
  import fpix1_pkg::*;
  logic clk = 0, rst_n = 0, capture = 0, clear = 0;
  logic [ADC_CMP-1:0] cmp = '0, therm, ref_q;
  int checks = 0, failures = 0;

  pixel_flash_adc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      cmp     = 3'($urandom);
      capture = $urandom_range(0, 2) == 0;
      clear   = $urandom_range(0, 3) == 0;
      @(posedge clk);
      if (capture)    ref_q = (clear ? 3'b000 : ref_q) | cmp;
      else if (clear) ref_q = '0;
      #1;
      checks++;
      if (therm !== ref_q) begin
        failures++;
        $display("step %0d: therm=%b expected %b", i, therm, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
