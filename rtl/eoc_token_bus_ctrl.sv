// eoc_token_bus_ctrl: token and bus controller of an FPIX1 column.
//
// As soon as one of the column's EOC sets issues "output" (out_active), the
// column token is released into the column, so it already waits at the first
// hit pixel. The chip-wide EOC token passes straight through a column that has
// nothing to read (eoc_token_out = eoc_token_in) and is held while the column
// still has pixels requesting the bus (RFastOR high). While it holds the
// token the column may advance: one pixel per readout clock is put on the
// column bus. The token is released as soon as RFastOR drops, i.e. in the
// clock in which the last pixel's data is on the bus, so the next column can
// be read at the following edge without an empty cycle. The bus controller
// forwards the column bus, tagged with the column number, to the chip-wide
// data bus (a wired-OR; zero when not driving). Tagging here is this
// design's choice.
module eoc_token_bus_ctrl
  import fpix1_pkg::*;
(
  input  logic             out_active,
  input  logic             rfast,
  input  logic             eoc_token_in,
  input  logic [COL_W-1:0] col_addr,
  input  logic             col_bus_valid,
  input  col_word_t        col_bus_word,
  output logic             col_token,
  output logic             advance,
  output logic             eoc_token_out,
  output logic             chip_bus_valid,
  output chip_word_t       chip_bus_word
);

  logic holds;

  always_comb begin
    holds          = out_active && rfast;
    col_token      = out_active;
    advance        = eoc_token_in && holds;
    eoc_token_out  = eoc_token_in && !holds;
    chip_bus_valid = col_bus_valid;
    chip_bus_word  = col_bus_valid ? chip_word_t'{col: col_addr, cw: col_bus_word} : '0;
  end

endmodule
