// eoc_set: one EOC command set of an FPIX1 column (four per column).
//
// Holds a 6-bit timestamp register, two comparators and the state machine
// that drives one pair of column command lines.
//   FREE   : issues "idle", or "look for data" while the priority encoder
//            selects it (lfd_sel). On HFastOR it loads the current crossing
//            number CBCO into the timestamp register (SBCO) and goes to HIT.
//   HIT    : keeps issuing "look for data" until the next beam-crossing edge
//            (bco_en), so every pixel hit in that crossing joins this set.
//   WAIT   : issues "idle" and compares. A reset match
//            ((SBCO ^ CBCO) & reset_mask) == 0 sends it to RESET; otherwise
//            SBCO == RBCO (with rbco_valid) sends it to OUTPUT.
//   OUTPUT : issues "output" until RFastOR is low (the last hit pixel has
//            been read), then FREE.
//   RESET  : issues "reset" for one clock, then FREE.
// reset_mask bit = 1 means "compare this bit"; comparing only the k low bits
// resets an unread hit 2^k crossings after it was taken (64 with all bits).
// State names, the meaning of the mask bits and the one-clock reset are this
// design's choices; the commands, the comparisons and the timing of the
// look-for-data to idle change follow FPIX1. bco_en marks the beam-crossing
// clock edge within the readout-clock domain.
module eoc_set
  import fpix1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bco_en,
  input  logic [BCO_W-1:0] cbco,
  input  logic [BCO_W-1:0] rbco,
  input  logic             rbco_valid,
  input  logic [BCO_W-1:0] reset_mask,
  input  logic             lfd_sel,
  input  logic             hfast,
  input  logic             rfast,
  output cmd_t             cmd,
  output logic             avail,
  output logic             has_data,
  output logic             outputting,
  output logic [BCO_W-1:0] sbco
);

  typedef enum logic [2:0] {S_FREE, S_HIT, S_WAIT, S_OUTPUT, S_RESET} state_t;
  state_t state;

  logic looking, load, rbco_match, reset_match;

  always_comb begin
    looking     = (state == S_FREE && lfd_sel) || state == S_HIT;
    load        = state == S_FREE && lfd_sel && hfast;   // the "AND" gate
    rbco_match  = rbco_valid && sbco == rbco;
    reset_match = ((sbco ^ cbco) & reset_mask) == '0;
    unique case (state)
      S_OUTPUT: cmd = CMD_OUTPUT;
      S_RESET:  cmd = CMD_RESET;
      default:  cmd = looking ? CMD_LOOK : CMD_IDLE;
    endcase
    avail      = state == S_FREE && !load;
    has_data   = state == S_OUTPUT || (state == S_WAIT && rbco_match && !reset_match);
    outputting = state == S_OUTPUT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_FREE;
      sbco  <= '0;
    end else begin
      if (load) sbco <= cbco;
      unique case (state)
        S_FREE:   if (load) state <= bco_en ? S_WAIT : S_HIT;
        S_HIT:    if (bco_en) state <= S_WAIT;
        S_WAIT:   if (reset_match)     state <= S_RESET;
                  else if (rbco_match) state <= S_OUTPUT;
        S_OUTPUT: if (!rfast) state <= S_FREE;
        S_RESET:  state <= S_FREE;
        default:  state <= S_FREE;
      endcase
    end
  end

endmodule
