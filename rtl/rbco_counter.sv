// rbco_counter: requested beam crossing number (RBCO) of FPIX1, with the
// readout-mode select.
//
// Continuous mode (cont_mode = 1): RBCO is an internal counter clocked by the
// readout clock that may not come closer than LAG (2) counts behind CBCO, so
// hit data has settled in the pixels. While no column has data for the
// current RBCO and the readout controller is not busy it advances by one per
// readout clock, so empty crossings are skipped quickly; it stops on a
// crossing with hits until that event has been read out. rbco_valid is 1.
// Externally triggered mode: an ext_trig pulse, accepted when trig_ready is
// high, loads ext_rbco; rbco_valid stays high until the readout controller
// reports the end of that event (done). A trigger while one is pending is
// dropped. The lag rule and the fast catch-up follow FPIX1; the trigger
// handshake and reset value (CBCO - LAG) are this design's choices.
module rbco_counter
  import fpix1_pkg::*;
#(
  parameter int unsigned LAG = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cont_mode,
  input  logic [BCO_W-1:0] cbco,
  input  logic             chip_has_data,
  input  logic             busy,
  input  logic             done,
  input  logic             ext_trig,
  input  logic [BCO_W-1:0] ext_rbco,
  output logic [BCO_W-1:0] rbco,
  output logic             rbco_valid,
  output logic             trig_ready
);

  logic [BCO_W-1:0] cnt;        // internal counter (continuous mode)
  logic [BCO_W-1:0] ext_q;      // latched external request
  logic             ext_valid;
  logic [BCO_W-1:0] gap;

  always_comb begin
    gap        = cbco - cnt;
    rbco       = cont_mode ? cnt : ext_q;    // readout mode select
    rbco_valid = cont_mode ? 1'b1 : ext_valid;
    trig_ready = !cont_mode && !ext_valid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= BCO_W'(0) - BCO_W'(LAG);
      ext_q     <= '0;
      ext_valid <= 1'b0;
    end else begin
      if (!chip_has_data && !busy && gap > BCO_W'(LAG))
        cnt <= cnt + 1'b1;
      if (ext_valid && done)
        ext_valid <= 1'b0;
      else if (ext_trig && trig_ready) begin
        ext_q     <= ext_rbco;
        ext_valid <= 1'b1;
      end
    end
  end

endmodule
