// fpix1_pkg: constants and types shared by the FPIX1 pixel readout chip.
//
// FPIX1 stores each pixel hit in the pixel cell and keeps the beam-crossing
// time stamp of the hit in one of four "EOC sets" at the end of its column.
// The four column commands and their two-bit codes (idle 00, reset 01,
// output 10, look for data 11) are those of the FPIX1 design. The address
// widths (8-bit row for 160 rows, 5-bit column for 18 columns), the chip ID
// width and the layout of the 16-bit chip output word are this design's own
// choices.
//
// Chip output word (16 bits):
//   hit word    : [15]=0, [14:10] column, [9:2] row, [1:0] ADC code
//   header word : [15]=1, [14:10] chip ID, [9:6] zero, [5:0] requested BCO
package fpix1_pkg;

  localparam int unsigned N_SETS    = 4;   // EOC sets per column
  localparam int unsigned BCO_W     = 6;   // beam crossing number width
  localparam int unsigned ROW_W     = 8;   // row address width (160 rows)
  localparam int unsigned COL_W     = 5;   // column address width (18 columns)
  localparam int unsigned ADC_CMP   = 3;   // flash ADC comparators
  localparam int unsigned ADC_W     = 2;   // encoded ADC bits
  localparam int unsigned CHIP_ID_W = 5;   // chip identifier width
  localparam int unsigned Q_W       = 16;  // charge in electrons (front-end model)

  typedef enum logic [1:0] {
    CMD_IDLE   = 2'b00,
    CMD_RESET  = 2'b01,
    CMD_OUTPUT = 2'b10,
    CMD_LOOK   = 2'b11   // "look for data"
  } cmd_t;

  // Word on a column bus: row address and raw ADC flip-flops.
  typedef struct packed {
    logic [ROW_W-1:0]   row;
    logic [ADC_CMP-1:0] therm;
  } col_word_t;

  // Word on the chip-wide EOC data bus: column bus word tagged with column.
  typedef struct packed {
    logic [COL_W-1:0] col;
    col_word_t        cw;
  } chip_word_t;

  typedef logic [15:0] out_word_t;

  function automatic out_word_t make_hit_word(logic [COL_W-1:0] col,
                                              logic [ROW_W-1:0] row,
                                              logic [ADC_W-1:0] adc);
    return {1'b0, col, row, adc};
  endfunction

  function automatic out_word_t make_header_word(logic [CHIP_ID_W-1:0] id,
                                                 logic [BCO_W-1:0] bco);
    return {1'b1, id, 4'b0000, bco};
  endfunction

endpackage
