// pixel_cell: one FPIX1 pixel unit cell.
//
// Wires together, as in the FPIX1 pixel block diagram, the analog front-end
// model (amplifier, discriminator, three ADC comparators), the ADC
// set-reset flip-flops, the command interpreter (with pixel kill and
// throttle) and the bus controller (token in/out, row address, ADC bits on
// the column bus). HFastOR and RFastOR are this cell's contributions to the
// column's wired-OR lines. All state is clocked by the readout clock.
// amp and disc bring out the raw amplifier and discriminator outputs (before
// the kill switch), used by the column for its directly observable test row.
module pixel_cell
  import fpix1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ROW_W-1:0] row_addr,
  input  logic [Q_W-1:0]   q_sensor,
  input  logic [Q_W-1:0]   q_test,
  input  logic             inj_en,
  input  logic             kill,
  input  logic [Q_W-1:0]   disc_thr,
  input  logic [Q_W-1:0]   adc_thr [ADC_CMP],
  input  logic             throttle,
  input  cmd_t             cmd [N_SETS],
  input  logic             token_in,
  input  logic             advance,
  output logic             token_out,
  output logic             hfast,
  output logic             rfast,
  output logic             bus_valid,
  output col_word_t        bus_word,
  output logic [Q_W-1:0]   amp,
  output logic             disc
);

  logic [ADC_CMP-1:0] adc_cmp;
  logic [ADC_CMP-1:0] therm;
  logic               hit, capture, read;

  pixel_frontend u_fe (
    .q_sensor, .q_test, .inj_en, .disc_thr, .adc_thr, .amp, .disc, .adc_cmp
  );

  pixel_cmd_interp u_ci (
    .clk, .rst_n, .disc, .kill, .throttle, .cmd, .read,
    .hfast, .rfast, .hit, .capture
  );

  pixel_flash_adc u_adc (
    .clk, .rst_n, .cmp(adc_cmp), .capture, .clear(!hit),
    .therm
  );

  pixel_bus_ctrl u_bc (
    .clk, .rst_n, .req(rfast), .token_in, .advance, .row_addr, .adc(therm),
    .token_out, .read, .bus_valid, .bus_word
  );

endmodule
