// adc_encoder: turns the three flash-ADC flip-flop bits of a pixel into the
// 2-bit ADC code, in the FPIX1 chip control logic.
//
// The comparators form a thermometer code (bit k set when the charge passed
// threshold k). The code is the number of the highest comparator that fired:
// 000 -> 0, 001 -> 1, 011 -> 2, 111 -> 3. A broken code is encoded by its
// highest set bit. The encoding rule is this design's choice. Combinational.
module adc_encoder
  import fpix1_pkg::*;
(
  input  logic [ADC_CMP-1:0] therm,
  output logic [ADC_W-1:0]   code
);

  always_comb begin
    code = '0;
    for (int k = 0; k < ADC_CMP; k++)
      if (therm[k]) code = ADC_W'(k + 1);
  end

endmodule
