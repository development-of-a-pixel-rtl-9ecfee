// chip_config: FPIX1 chip programming control (serial configuration).
//
// The configuration is one long shift register loaded from a serial bit
// stream: while ser_en is high, ser_in enters bit 0 and every bit moves one
// place up on each clock; ser_out is the last bit, so registers of several
// chips can be chained as a scan path. The register holds, from the top:
//   chip ID (CHIP_ID_W bits), readout mode (1 = continuous), reset-delay
//   mask (BCO_W bits), then for each column c and row r a kill bit and a
//   pulse-injection-select bit (kill at 2*(c*ROWS+r)+1, inject at
//   2*(c*ROWS+r)).
// The first bit shifted in ends up at the top (chip ID MSB) after
// CFG_BITS clocks. Settings take effect as bits move (no shadow register).
// Reset: chip ID 0, continuous mode, mask all ones (reset delay 64
// crossings), no pixel killed or injected. Kill pattern and injection select
// are FPIX1 features; the other fields, their order and the reset values are
// this design's choices.
module chip_config
  import fpix1_pkg::*;
#(
  parameter int unsigned ROWS = 160,
  parameter int unsigned COLS = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ser_en,
  input  logic                 ser_in,
  output logic                 ser_out,
  output logic [CHIP_ID_W-1:0] chip_id,
  output logic                 cont_mode,
  output logic [BCO_W-1:0]     reset_mask,
  output logic                 kill   [COLS][ROWS],
  output logic                 inj_en [COLS][ROWS]
);

  localparam int unsigned PIX_BITS = 2 * ROWS * COLS;
  localparam int unsigned CFG_BITS = PIX_BITS + BCO_W + 1 + CHIP_ID_W;
  localparam logic [CFG_BITS-1:0] RESET_VALUE =
    {{CHIP_ID_W{1'b0}}, 1'b1, {BCO_W{1'b1}}, {PIX_BITS{1'b0}}};

  logic [CFG_BITS-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n)      sr <= RESET_VALUE;
    else if (ser_en) sr <= {sr[CFG_BITS-2:0], ser_in};
  end

  assign ser_out    = sr[CFG_BITS-1];
  assign chip_id    = sr[CFG_BITS-1 -: CHIP_ID_W];
  assign cont_mode  = sr[PIX_BITS + BCO_W];
  assign reset_mask = sr[PIX_BITS +: BCO_W];

  for (genvar c = 0; c < COLS; c++) begin : g_col
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      assign kill[c][r]   = sr[2*(c*ROWS + r) + 1];
      assign inj_en[c][r] = sr[2*(c*ROWS + r)];
    end
  end

endmodule
