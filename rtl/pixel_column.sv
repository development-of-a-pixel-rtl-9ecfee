// pixel_column: one FPIX1 column of ROWS pixel cells.
//
// All cells of a column see the same four pairs of command lines from the
// end-of-column (EOC) logic. Their HFastOR and RFastOR contributions are
// wire-ORed into one HFastOR and one RFastOR line, and their bus words into
// one column bus (a cell not driving outputs zero). The column token enters at
// the bottom cell (row 0) and ripples upward through cells that do not
// request the bus; token_out is the token leaving the top cell. The FPIX1
// column has 160 rows; row r has row address r.
// The amplifier and discriminator outputs of one row, TEST_ROW, are brought
// out (test_amp, test_disc) for direct observation, as the chip does for one
// row of cells; which row that is, is this model's choice (row 0).
module pixel_column
  import fpix1_pkg::*;
#(
  parameter int unsigned ROWS = 160,
  parameter int unsigned TEST_ROW = 0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [Q_W-1:0] q_sensor [ROWS],
  input  logic [Q_W-1:0] q_test,
  input  logic           inj_en [ROWS],
  input  logic           kill [ROWS],
  input  logic [Q_W-1:0] disc_thr,
  input  logic [Q_W-1:0] adc_thr [ADC_CMP],
  input  logic           throttle,
  input  cmd_t           cmd [N_SETS],
  input  logic           col_token,
  input  logic           advance,
  output logic           token_out,
  output logic           hfast_or,
  output logic           rfast_or,
  output logic           bus_valid,
  output col_word_t      bus_word,
  output logic [Q_W-1:0] test_amp,
  output logic           test_disc
);

  logic      tok   [ROWS+1];
  logic      hf    [ROWS];
  logic      rf    [ROWS];
  logic      bv    [ROWS];
  col_word_t bw    [ROWS];
  logic [Q_W-1:0] amp [ROWS];
  logic      disc  [ROWS];

  assign tok[0]    = col_token;
  assign token_out = tok[ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    pixel_cell u_cell (
      .clk, .rst_n,
      .row_addr (ROW_W'(r)),
      .q_sensor (q_sensor[r]),
      .q_test,
      .inj_en   (inj_en[r]),
      .kill     (kill[r]),
      .disc_thr, .adc_thr, .throttle, .cmd,
      .token_in (tok[r]),
      .advance,
      .token_out(tok[r+1]),
      .hfast    (hf[r]),
      .rfast    (rf[r]),
      .bus_valid(bv[r]),
      .bus_word (bw[r]),
      .amp      (amp[r]),
      .disc     (disc[r])
    );
  end

  assign test_amp  = amp[TEST_ROW];
  assign test_disc = disc[TEST_ROW];

  always_comb begin
    hfast_or  = 1'b0;
    rfast_or  = 1'b0;
    bus_valid = 1'b0;
    bus_word  = '0;
    for (int r = 0; r < ROWS; r++) begin
      hfast_or  |= hf[r];
      rfast_or  |= rf[r];
      bus_valid |= bv[r];
      bus_word  |= bw[r];
    end
  end

endmodule
