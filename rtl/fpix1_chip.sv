// fpix1_chip: the FPIX1 pixel readout chip.
//
// COLS columns of ROWS pixel cells (160 x 18 cells of 50 um x 400 um), each
// with its end-of-column logic, plus the chip control logic: CBCO and RBCO
// counters, readout controller and serial configuration. A pixel hit is
// stored in its cell and tied to one of four EOC sets of its column, which
// holds the crossing number. Hits are read out by requested crossing
// (continuous mode: every crossing with hits, RBCO lagging CBCO by 2;
// triggered mode: crossings requested with ext_trig/ext_rbco). An event is
// a header word (chip ID, RBCO) followed by one word per hit pixel (column,
// row, 2-bit ADC), one per readout clock.
//
// Clocking: clk is the readout clock; bco_en is a one-clock pulse marking
// each Beam Crossing Clock edge (this design's single-clock choice). The
// discriminator thresholds are inputs in electrons, standing for the chip's
// DC threshold levels. The EOC token enters column 0 and leaves after column
// COLS-1 (order is this design's choice). The chip-wide EOC data bus is a
// wired-OR of the columns' outputs. test_amp and test_disc give direct
// access to the amplifier and discriminator outputs of row TEST_ROW of every
// column, as the chip routes one row of cells to test pads (row 0 here is
// this design's choice).
module fpix1_chip
  import fpix1_pkg::*;
#(
  parameter int unsigned ROWS = 160,
  parameter int unsigned COLS = 18,
  parameter int unsigned TEST_ROW = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bco_en,
  input  logic [Q_W-1:0]       q_sensor [COLS][ROWS],
  input  logic [Q_W-1:0]       q_test,
  input  logic [Q_W-1:0]       disc_thr,
  input  logic [Q_W-1:0]       adc_thr [ADC_CMP],
  input  logic                 throttle,
  input  logic                 ext_trig,
  input  logic [BCO_W-1:0]     ext_rbco,
  input  logic                 chip_token_in,
  input  logic                 ser_en,
  input  logic                 ser_in,
  output logic                 ser_out,
  output logic                 trig_ready,
  output logic                 chip_token_out,
  output out_word_t            dout,
  output logic                 dout_valid,
  output logic [BCO_W-1:0]     cbco,
  output logic [BCO_W-1:0]     rbco,
  output logic [Q_W-1:0]       test_amp [COLS],
  output logic                 test_disc [COLS]
);

  // configuration
  logic [CHIP_ID_W-1:0] chip_id;
  logic                 cont_mode;
  logic [BCO_W-1:0]     reset_mask;
  logic                 kill   [COLS][ROWS];
  logic                 inj_en [COLS][ROWS];

  chip_config #(.ROWS(ROWS), .COLS(COLS)) u_cfg (
    .clk, .rst_n, .ser_en, .ser_in, .ser_out, .chip_id, .cont_mode,
    .reset_mask, .kill, .inj_en
  );

  // beam crossing numbers
  logic rbco_valid, chip_has_data, ro_busy, ro_done;

  cbco_counter u_cbco (.clk, .rst_n, .bco_en, .cbco);

  rbco_counter u_rbco (
    .clk, .rst_n, .cont_mode, .cbco, .chip_has_data, .busy(ro_busy),
    .done(ro_done), .ext_trig, .ext_rbco, .rbco, .rbco_valid, .trig_ready
  );

  // columns
  logic       eoc_tok [COLS+1];
  logic       col_has_data [COLS];
  logic       cbv [COLS];
  chip_word_t cbw [COLS];

  for (genvar c = 0; c < COLS; c++) begin : g_col
    cmd_t      cmd [N_SETS];
    logic      hfast, rfast, col_token, advance, bus_valid;
    col_word_t bus_word;

    pixel_column #(.ROWS(ROWS), .TEST_ROW(TEST_ROW)) u_col (
      .clk, .rst_n,
      .q_sensor (q_sensor[c]),
      .q_test,
      .inj_en   (inj_en[c]),
      .kill     (kill[c]),
      .disc_thr, .adc_thr, .throttle, .cmd, .col_token, .advance,
      .token_out(),
      .hfast_or (hfast),
      .rfast_or (rfast),
      .bus_valid, .bus_word,
      .test_amp (test_amp[c]),
      .test_disc(test_disc[c])
    );

    eoc_logic u_eoc (
      .clk, .rst_n, .bco_en, .cbco, .rbco, .rbco_valid, .reset_mask,
      .col_addr      (COL_W'(c)),
      .hfast, .rfast,
      .col_bus_valid (bus_valid),
      .col_bus_word  (bus_word),
      .eoc_token_in  (eoc_tok[c]),
      .cmd, .col_token, .advance,
      .eoc_token_out (eoc_tok[c+1]),
      .col_has_data  (col_has_data[c]),
      .chip_bus_valid(cbv[c]),
      .chip_bus_word (cbw[c])
    );
  end

  // chip-wide EOC data bus (wired-OR) and "chip has data"
  logic       chip_bus_valid;
  chip_word_t chip_bus_word;

  always_comb begin
    chip_has_data  = 1'b0;
    chip_bus_valid = 1'b0;
    chip_bus_word  = '0;
    for (int c = 0; c < COLS; c++) begin
      chip_has_data  |= col_has_data[c];
      chip_bus_valid |= cbv[c];
      chip_bus_word  |= cbw[c];
    end
  end

  readout_controller u_ro (
    .clk, .rst_n, .cont_mode, .chip_has_data, .rbco_valid, .rbco, .chip_id,
    .chip_token_in,
    .eoc_token_return(eoc_tok[COLS]),
    .chip_bus_valid, .chip_bus_word,
    .eoc_token       (eoc_tok[0]),
    .chip_token_out, .dout, .dout_valid,
    .busy(ro_busy), .done(ro_done)
  );

  // At most one pixel drives the chip-wide bus per clock.
  logic [COLS-1:0] cbv_vec;
  always_comb
    for (int c = 0; c < COLS; c++) cbv_vec[c] = cbv[c];
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cbv_vec));

endmodule
