// fpix0_readout: zero-suppressed token readout of the FPIX0 test chip.
//
// An array of COLS x ROWS (12 x 64) cells. Each cell latches a discriminator
// hit in a set-reset flip-flop and asserts the chip's fast-OR. With token_in
// high the readout token ripples through the array, column 0 rows 0..63, then
// column 1, and so on, skipping cells without a hit; the first hit cell keeps
// it and drives its address {column, row} on the output bus (addr_valid high).
// Each token_advance pulse resets that cell and so hands the token to the
// next hit cell. token_out is high when the token has passed every cell (no
// hit left). The scan order, address format and synchronous strobes are this
// design's choices; the cell behaviour follows FPIX0. The analog peak-detector
// output that accompanies each address is not modelled.
module fpix0_readout #(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 12
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            disc [COLS][ROWS],
  input  logic                            kill [COLS][ROWS],
  input  logic                            token_in,
  input  logic                            token_advance,
  output logic                            token_out,
  output logic                            fast_or,
  output logic                            addr_valid,
  output logic [$clog2(COLS)+$clog2(ROWS)-1:0] addr
);

  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned CW = $clog2(COLS);
  localparam int unsigned N  = ROWS * COLS;

  logic          tok [N+1];
  logic          fo  [N];
  logic          ht  [N];
  logic [CW+RW-1:0] bus [N];

  assign tok[0]    = token_in;
  assign token_out = tok[N];

  for (genvar c = 0; c < COLS; c++) begin : g_col
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      localparam int unsigned I = c * ROWS + r;
      fpix0_cell #(.ADDR_W(CW + RW)) u_cell (
        .clk, .rst_n,
        .disc         (disc[c][r]),
        .kill         (kill[c][r]),
        .addr         ({CW'(c), RW'(r)}),
        .token_in     (tok[I]),
        .token_advance,
        .token_out    (tok[I+1]),
        .fast_or      (fo[I]),
        .has_token    (ht[I]),
        .bus          (bus[I])
      );
    end
  end

  always_comb begin
    fast_or    = 1'b0;
    addr_valid = 1'b0;
    addr       = '0;
    for (int i = 0; i < N; i++) begin
      fast_or    |= fo[i];
      addr_valid |= ht[i];
      addr       |= bus[i];
    end
  end

endmodule
