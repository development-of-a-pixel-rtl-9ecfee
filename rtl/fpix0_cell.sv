// fpix0_cell: readout logic of one FPIX0 pixel cell.
//
// When the (unkilled) discriminator fires, a set-reset flip-flop stores the
// hit and the cell adds to the chip's fast-OR. The readout token passes
// straight through a cell without a hit and stops at a hit cell, which then
// places its address on the output bus (a wired-OR: zero when not holding the
// token). An external token-advance strobe makes the cell holding the token
// reset itself, which passes the token on to the next hit cell. The
// discriminator is sampled on clk and token_advance is a one-clock pulse
// (this design's choices); the rest follows FPIX0.
module fpix0_cell #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              disc,
  input  logic              kill,
  input  logic [ADDR_W-1:0] addr,
  input  logic              token_in,
  input  logic              token_advance,
  output logic              token_out,
  output logic              fast_or,
  output logic              has_token,
  output logic [ADDR_W-1:0] bus
);

  logic hit;

  always_comb begin
    has_token = token_in && hit;
    token_out = token_in && !hit;
    fast_or   = hit;
    bus       = has_token ? addr : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                         hit <= 1'b0;
    else if (has_token && token_advance) hit <= 1'b0;
    else if (disc && !kill)             hit <= 1'b1;
  end

endmodule
