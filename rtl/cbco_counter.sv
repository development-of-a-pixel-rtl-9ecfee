// cbco_counter: current beam crossing number (CBCO) of FPIX1.
//
// A 6-bit counter that advances by one, modulo 64, at every beam crossing
// (bco_en marks the Beam Crossing Clock edge in the readout-clock domain).
// Its value is broadcast to all EOC sets. Reset value 0 is this design's
// choice.
module cbco_counter
  import fpix1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bco_en,
  output logic [BCO_W-1:0] cbco
);

  always_ff @(posedge clk) begin
    if (!rst_n)      cbco <= '0;
    else if (bco_en) cbco <= cbco + 1'b1;
  end

endmodule
