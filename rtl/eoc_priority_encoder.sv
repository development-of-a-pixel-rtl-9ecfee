// eoc_priority_encoder: chooses which EOC set of a column issues "look for
// data".
//
// Exactly one set, or none when all four are busy, is selected (lfd_sel,
// one-hot). The choice changes only at a beam-crossing edge (bco_en): the
// current set is kept while it is still available (no hit taken); otherwise
// the lowest-numbered available set is chosen. A set that took a hit in this
// crossing reports itself unavailable, so the next crossing's hits go to a
// new set. After reset set 0 is selected. FPIX1 specifies a priority encoder
// that assigns the next available set at the next BCO edge; keeping the
// current set and the lowest-index priority are this design's choices.
module eoc_priority_encoder
  import fpix1_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bco_en,
  input  logic [N_SETS-1:0] avail,
  output logic [N_SETS-1:0] lfd_sel
);

  logic [N_SETS-1:0] lowest;

  always_comb begin
    lowest = '0;
    for (int s = N_SETS - 1; s >= 0; s--)
      if (avail[s]) lowest = N_SETS'(1) << s;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      lfd_sel <= N_SETS'(1);
    else if (bco_en && (lfd_sel & avail) == '0)
      lfd_sel <= lowest;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(lfd_sel));

endmodule
