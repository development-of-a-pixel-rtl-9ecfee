// fpix_top: the two pixel readout chips side by side.
//
// fpix1_* : the FPIX1 readout chip (160 x 18 pixels, four EOC sets per
//           column, continuous or externally triggered readout by beam
//           crossing number, serial configuration).
// fpix0_* : the token readout of the earlier FPIX0 test chip (64 x 12 pixels,
//           externally advanced token).
// The two are independent and share only the clock and reset; each brings
// out its own ports. clk is the readout clock; fpix1_bco_en marks beam
// crossings. Port meanings are described in fpix1_chip and fpix0_readout.
module fpix_top
  import fpix1_pkg::*;
#(
  parameter int unsigned F1_ROWS = 160,
  parameter int unsigned F1_COLS = 18,
  parameter int unsigned F0_ROWS = 64,
  parameter int unsigned F0_COLS = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // FPIX1
  input  logic                 fpix1_bco_en,
  input  logic [Q_W-1:0]       fpix1_q_sensor [F1_COLS][F1_ROWS],
  input  logic [Q_W-1:0]       fpix1_q_test,
  input  logic [Q_W-1:0]       fpix1_disc_thr,
  input  logic [Q_W-1:0]       fpix1_adc_thr [ADC_CMP],
  input  logic                 fpix1_throttle,
  input  logic                 fpix1_ext_trig,
  input  logic [BCO_W-1:0]     fpix1_ext_rbco,
  input  logic                 fpix1_chip_token_in,
  input  logic                 fpix1_ser_en,
  input  logic                 fpix1_ser_in,
  output logic                 fpix1_ser_out,
  output logic                 fpix1_trig_ready,
  output logic                 fpix1_chip_token_out,
  output out_word_t            fpix1_dout,
  output logic                 fpix1_dout_valid,
  output logic [BCO_W-1:0]     fpix1_cbco,
  output logic [BCO_W-1:0]     fpix1_rbco,
  output logic [Q_W-1:0]       fpix1_test_amp [F1_COLS],
  output logic                 fpix1_test_disc [F1_COLS],
  // FPIX0
  input  logic                 fpix0_disc [F0_COLS][F0_ROWS],
  input  logic                 fpix0_kill [F0_COLS][F0_ROWS],
  input  logic                 fpix0_token_in,
  input  logic                 fpix0_token_advance,
  output logic                 fpix0_token_out,
  output logic                 fpix0_fast_or,
  output logic                 fpix0_addr_valid,
  output logic [$clog2(F0_COLS)+$clog2(F0_ROWS)-1:0] fpix0_addr
);

  fpix1_chip #(.ROWS(F1_ROWS), .COLS(F1_COLS)) u_fpix1 (
    .clk, .rst_n,
    .bco_en        (fpix1_bco_en),
    .q_sensor      (fpix1_q_sensor),
    .q_test        (fpix1_q_test),
    .disc_thr      (fpix1_disc_thr),
    .adc_thr       (fpix1_adc_thr),
    .throttle      (fpix1_throttle),
    .ext_trig      (fpix1_ext_trig),
    .ext_rbco      (fpix1_ext_rbco),
    .chip_token_in (fpix1_chip_token_in),
    .ser_en        (fpix1_ser_en),
    .ser_in        (fpix1_ser_in),
    .ser_out       (fpix1_ser_out),
    .trig_ready    (fpix1_trig_ready),
    .chip_token_out(fpix1_chip_token_out),
    .dout          (fpix1_dout),
    .dout_valid    (fpix1_dout_valid),
    .cbco          (fpix1_cbco),
    .rbco          (fpix1_rbco),
    .test_amp      (fpix1_test_amp),
    .test_disc     (fpix1_test_disc)
  );

  fpix0_readout #(.ROWS(F0_ROWS), .COLS(F0_COLS)) u_fpix0 (
    .clk, .rst_n,
    .disc         (fpix0_disc),
    .kill         (fpix0_kill),
    .token_in     (fpix0_token_in),
    .token_advance(fpix0_token_advance),
    .token_out    (fpix0_token_out),
    .fast_or      (fpix0_fast_or),
    .addr_valid   (fpix0_addr_valid),
    .addr         (fpix0_addr)
  );

endmodule
