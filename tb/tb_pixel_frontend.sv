// tb_pixel_frontend: checks the front-end model against an independent
// reference: charge plus optional test charge, clipped at the 32000 e-
// dynamic range, compared with the discriminator and three ADC thresholds.
// The amplifier output amp must equal the clipped charge. Random charges and
// thresholds, including values beyond the dynamic range.
module tb_pixel_frontend;
  import fpix1_pkg::*;
  logic [Q_W-1:0] q_sensor, q_test, disc_thr, amp;
  logic [Q_W-1:0] adc_thr [ADC_CMP];
  logic inj_en, disc;
  logic [ADC_CMP-1:0] adc_cmp;
  int checks = 0, failures = 0;

  pixel_frontend dut (.*);

  function automatic int clip(int q);
    return q > 32000 ? 32000 : q;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int q, exp_adc;
      q_sensor = Q_W'($urandom_range(0, 40000));
      q_test   = Q_W'($urandom_range(0, 20000));
      inj_en   = $urandom_range(0, 1) == 1;
      disc_thr = Q_W'($urandom_range(0, 34000));
      for (int k = 0; k < ADC_CMP; k++) adc_thr[k] = Q_W'($urandom_range(0, 34000));
      if (i % 5 == 0) begin  // thresholds straddling the saturation point
        disc_thr = Q_W'(31990 + $urandom_range(0, 20));
        q_sensor = 16'd40000;
      end
      #1;
      q = clip(int'(q_sensor) + (inj_en ? int'(q_test) : 0));
      checks++;
      if (int'(amp) != q) begin
        failures++;
        $display("amp mismatch q=%0d got %0d", q, amp);
      end
      checks++;
      if (disc !== (q > int'(disc_thr))) begin
        failures++;
        $display("disc mismatch q=%0d thr=%0d got %b", q, disc_thr, disc);
      end
      for (int k = 0; k < ADC_CMP; k++) begin
        checks++;
        if (adc_cmp[k] !== (q > int'(adc_thr[k]))) begin
          failures++;
          $display("adc[%0d] mismatch q=%0d thr=%0d", k, q, adc_thr[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
