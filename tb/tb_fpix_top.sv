// tb_fpix_top: end-to-end test of the top level at its default sizes:
// the FPIX1 chip (160 rows x 18 columns) and the FPIX0 readout (64 x 12).
//
// FPIX1 is run through the shared bench (fpix1_bench.svh): serial
// configuration, continuous-mode traffic with ADC codes, throttle, killed
// pixels, test-charge injection, EOC-set overflow while the chip readout
// token is withheld, triggered mode with requested, reset and empty
// crossings; every output word is checked against a reference model and each
// mechanism must have happened; the test-row outputs are checked every clock. In parallel FPIX0 takes random hit patterns
// and is read out with token-advance pulses; addresses must come in scan
// order. 16 readout clocks per beam crossing.
module tb_fpix_top;
  import fpix1_pkg::*;
  localparam int ROWS = 160, COLS = 18, DIV = 16;
  localparam int NB = 2 * ROWS * COLS + BCO_W + 1 + CHIP_ID_W;
  localparam logic [CHIP_ID_W-1:0] ID = 5'd19;
  localparam int WATCHDOG = 400000;
  localparam int F0R = 64, F0C = 12;

  logic clk = 0, rst_n = 0, bco_en;
  logic [Q_W-1:0] q_sensor [COLS][ROWS];
  logic [Q_W-1:0] q_test = '0, disc_thr = 16'd2000;
  logic [Q_W-1:0] adc_thr [ADC_CMP];
  logic throttle = 0, ext_trig = 0, chip_token_in = 1, ser_en = 0, ser_in = 0;
  logic [BCO_W-1:0] ext_rbco = '0, cbco, rbco;
  logic ser_out, trig_ready, chip_token_out, dout_valid;
  out_word_t dout;
  logic [Q_W-1:0] test_amp [COLS];
  logic test_disc [COLS];

  logic f0_disc [F0C][F0R], f0_kill [F0C][F0R];
  logic f0_token_in = 0, f0_advance = 0, f0_token_out, f0_fast_or, f0_addr_valid;
  logic [9:0] f0_addr;

  fpix_top dut (
    .clk, .rst_n,
    .fpix1_bco_en(bco_en), .fpix1_q_sensor(q_sensor), .fpix1_q_test(q_test),
    .fpix1_disc_thr(disc_thr), .fpix1_adc_thr(adc_thr), .fpix1_throttle(throttle),
    .fpix1_ext_trig(ext_trig), .fpix1_ext_rbco(ext_rbco),
    .fpix1_chip_token_in(chip_token_in), .fpix1_ser_en(ser_en), .fpix1_ser_in(ser_in),
    .fpix1_ser_out(ser_out), .fpix1_trig_ready(trig_ready),
    .fpix1_chip_token_out(chip_token_out), .fpix1_dout(dout), .fpix1_dout_valid(dout_valid),
    .fpix1_cbco(cbco), .fpix1_rbco(rbco),
    .fpix1_test_amp(test_amp), .fpix1_test_disc(test_disc),
    .fpix0_disc(f0_disc), .fpix0_kill(f0_kill), .fpix0_token_in(f0_token_in),
    .fpix0_token_advance(f0_advance), .fpix0_token_out(f0_token_out),
    .fpix0_fast_or(f0_fast_or), .fpix0_addr_valid(f0_addr_valid), .fpix0_addr(f0_addr)
  );

  `include "fpix1_bench.svh"

  int n_f0_reads = 0;

  task automatic fpix0_run;
    logic stored [F0C][F0R];
    int n;
    for (int c = 0; c < F0C; c++)
      for (int r = 0; r < F0R; r++) begin f0_disc[c][r] = 0; f0_kill[c][r] = 0; stored[c][r] = 0; end
    wait (rst_n);
    for (int iter = 0; iter < 20; iter++) begin
      n = 0;
      for (int c = 0; c < F0C; c++)
        for (int r = 0; r < F0R; r++) begin
          f0_kill[c][r] = $urandom_range(0, 19) == 0;
          f0_disc[c][r] = $urandom_range(0, 49) == 0;
          if (f0_disc[c][r] && !f0_kill[c][r]) stored[c][r] = 1;
        end
      next_clk();
      for (int c = 0; c < F0C; c++)
        for (int r = 0; r < F0R; r++) begin f0_disc[c][r] = 0; if (stored[c][r]) n++; end
      check("fpix0 fast_or", int'(f0_fast_or), int'(n != 0));
      f0_token_in = 1;
      for (int c = 0; c < F0C; c++)
        for (int r = 0; r < F0R; r++)
          if (stored[c][r]) begin
            #1;
            check("fpix0 addr_valid", int'(f0_addr_valid), 1);
            check("fpix0 addr", int'(f0_addr), c * 64 + r);
            f0_advance = 1;
            next_clk();
            f0_advance = 0;
            stored[c][r] = 0;
            n_f0_reads++;
          end
      #1;
      check("fpix0 token through", int'(f0_token_out), 1);
      check("fpix0 no addr", int'(f0_addr_valid), 0);
      f0_token_in = 0;
    end
  endtask

  initial begin
    fork
      run_all();
      fpix0_run();
    join
    check("mechanism: fpix0 token advance", int'(n_f0_reads > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
