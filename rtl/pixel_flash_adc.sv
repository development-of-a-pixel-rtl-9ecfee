// pixel_flash_adc: the digital part of the pixel's 2-bit flash ADC.
//
// Each of the three ADC comparators drives a set-reset flip-flop, as in the
// FPIX1 pixel cell. A flip-flop is set when its comparator fires while the
// pixel is taking a hit (capture high). clear is high while the pixel holds
// no hit: the flip-flops are then emptied, and a capture in that state starts
// a fresh code rather than adding to an old one. The stored thermometer code is
// sent on the column bus at readout and encoded into two bits in the chip
// control logic. Limiting setting to the capture window (the crossing of the
// hit) is this design's choice. Synchronous to clk, active-low reset.
module pixel_flash_adc
  import fpix1_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ADC_CMP-1:0] cmp,
  input  logic               capture,
  input  logic               clear,
  output logic [ADC_CMP-1:0] therm
);

  always_ff @(posedge clk) begin
    if (!rst_n)       therm <= '0;
    else if (capture) therm <= (clear ? '0 : therm) | cmp;
    else if (clear)   therm <= '0;
  end

endmodule
