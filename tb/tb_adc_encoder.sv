// tb_adc_encoder: exhaustive check of the thermometer-to-2-bit encoding
// against a hand-written table (highest comparator that fired).
module tb_adc_encoder;
  import fpix1_pkg::*;
  logic [ADC_CMP-1:0] therm;
  logic [ADC_W-1:0]   code;
  int checks = 0, failures = 0;
  // expected code for therm = 0..7
  logic [1:0] expected [8] = '{2'd0, 2'd1, 2'd2, 2'd2, 2'd3, 2'd3, 2'd3, 2'd3};

  adc_encoder dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      therm = 3'(t);
      #1;
      checks++;
      if (code !== expected[t]) begin
        failures++;
        $display("therm=%b code=%0d expected %0d", therm, code, expected[t]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
