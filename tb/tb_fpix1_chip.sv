// tb_fpix1_chip: end-to-end test of the FPIX1 chip at reduced size
// (16 rows x 4 columns, 16 readout clocks per beam crossing).
//
// The chip is configured through its serial port. A reference model in the
// bench records which pixels it hits in which crossing (charge, kill,
// injection, throttle, EOC-set availability) and predicts the chip output:
// per event a header (chip ID, crossing number) and the hit words ordered by
// column then row, with 2-bit ADC codes. Every output word is compared in
// order, and the words of one event must come on consecutive clocks.
// Phases: random continuous-mode traffic; set overflow (readout held off by
// the chip token, hits of a fifth crossing in a column are lost);
// throttle; killed pixels; test-charge injection; triggered mode with
// requested, unrequested (reset after the masked delay) and empty crossings.
// The test-row amplifier and discriminator outputs are checked every clock.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_fpix1_chip;
  import fpix1_pkg::*;
  localparam int ROWS = 16, COLS = 4, DIV = 16;
  localparam int NB = 2 * ROWS * COLS + BCO_W + 1 + CHIP_ID_W;
  localparam logic [CHIP_ID_W-1:0] ID = 5'd19;
  localparam int WATCHDOG = 200000;

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

  fpix1_chip #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  `include "fpix1_bench.svh"

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
