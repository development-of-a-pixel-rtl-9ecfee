// pixel_frontend: behavioural model of the FPIX1 pixel analog front end.
//
// Not synthesizable hardware in the real chip: it stands for the two-stage
// charge amplifier (with its test-charge input), the discriminator and the
// three flash-ADC comparators. Charge is given as a number of electrons; the
// amplifier saturates at its dynamic range of about 32000 e-. The
// discriminator fires when the charge exceeds disc_thr, and comparator k
// fires when it exceeds adc_thr[k]. Thresholds stand for the four DC levels
// common to all pixels, expressed in electrons. Noise, pulse shape and time
// walk are not modelled: outputs follow the inputs combinationally.
// The test charge q_test is added only when inj_en (pulse injection select)
// is set for this pixel. amp is the amplifier output, taken here as the
// saturated charge in electrons; the chip brings the amplifier and
// discriminator outputs of one row out to pads for testing.
module pixel_frontend
  import fpix1_pkg::*;
#(
  parameter int unsigned DYN_RANGE_E = 32000
) (
  input  logic [Q_W-1:0] q_sensor,
  input  logic [Q_W-1:0] q_test,
  input  logic           inj_en,
  input  logic [Q_W-1:0] disc_thr,
  input  logic [Q_W-1:0] adc_thr [ADC_CMP],
  output logic [Q_W-1:0] amp,
  output logic           disc,
  output logic [ADC_CMP-1:0] adc_cmp
);

  logic [Q_W:0] q_sum;
  logic [Q_W:0] q_amp;   // charge seen after the amplifier, saturated

  always_comb begin
    q_sum = {1'b0, q_sensor} + (inj_en ? {1'b0, q_test} : '0);
    q_amp = (q_sum > (Q_W+1)'(DYN_RANGE_E)) ? (Q_W+1)'(DYN_RANGE_E) : q_sum;
    disc  = q_amp > {1'b0, disc_thr};
    for (int k = 0; k < ADC_CMP; k++)
      adc_cmp[k] = q_amp > {1'b0, adc_thr[k]};
  end

  // DYN_RANGE_E fits in Q_W bits, so the saturated charge does too
  assign amp = q_amp[Q_W-1:0];

endmodule
