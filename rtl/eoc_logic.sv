// eoc_logic: end-of-column logic of one FPIX1 column.
//
// Four EOC command sets, the priority encoder that lets one of them issue
// "look for data", and the token and bus controller. The sets' command pairs
// go to every pixel of the column. HFastOR and RFastOR come back from the
// column; HFastOR reaches only the set that is looking for data, which is
// the one whose timestamp register loads. col_has_data tells the chip
// control logic that this column holds hits for the requested crossing.
module eoc_logic
  import fpix1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bco_en,
  input  logic [BCO_W-1:0] cbco,
  input  logic [BCO_W-1:0] rbco,
  input  logic             rbco_valid,
  input  logic [BCO_W-1:0] reset_mask,
  input  logic [COL_W-1:0] col_addr,
  input  logic             hfast,
  input  logic             rfast,
  input  logic             col_bus_valid,
  input  col_word_t        col_bus_word,
  input  logic             eoc_token_in,
  output cmd_t             cmd [N_SETS],
  output logic             col_token,
  output logic             advance,
  output logic             eoc_token_out,
  output logic             col_has_data,
  output logic             chip_bus_valid,
  output chip_word_t       chip_bus_word
);

  logic [N_SETS-1:0] avail, lfd_sel, has_data, outputting;
  logic [BCO_W-1:0]  sbco [N_SETS];

  eoc_priority_encoder u_pe (.clk, .rst_n, .bco_en, .avail, .lfd_sel);

  for (genvar s = 0; s < N_SETS; s++) begin : g_set
    eoc_set u_set (
      .clk, .rst_n, .bco_en, .cbco, .rbco, .rbco_valid, .reset_mask,
      .lfd_sel   (lfd_sel[s]),
      .hfast, .rfast,
      .cmd       (cmd[s]),
      .avail     (avail[s]),
      .has_data  (has_data[s]),
      .outputting(outputting[s]),
      .sbco      (sbco[s])
    );
  end

  assign col_has_data = |has_data;

  eoc_token_bus_ctrl u_tbc (
    .out_active(|outputting), .rfast, .eoc_token_in, .col_addr,
    .col_bus_valid, .col_bus_word,
    .col_token, .advance, .eoc_token_out, .chip_bus_valid, .chip_bus_word
  );

  // Only one set may ever issue "look for data" at a time.
  logic [N_SETS-1:0] looking;
  always_comb
    for (int s = 0; s < N_SETS; s++) looking[s] = cmd[s] == CMD_LOOK;
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(looking));

endmodule
