// readout_controller: event readout sequencing of the FPIX1 chip control
// logic.
//
// An event is ready when, in continuous mode, some column has hits for the
// requested crossing (chip_has_data), or, in triggered mode, an external
// request is pending (rbco_valid). The controller then waits for the chip
// readout token of the external bus (chip_token_in; a chip with nothing to
// send passes it on at chip_token_out), sends one header word with the chip
// ID and RBCO, and injects the EOC token into column 0. The EOC token ripples
// through the columns; each column holding hits keeps it while it reads out,
// one pixel per readout clock. Every pixel word on the chip-wide bus is sent
// on as a hit word, its ADC bits encoded into two. When the token comes back
// from the last column the event is complete: done pulses for one clock.
//   IDLE -> ARB (event ready) -> HEADER (token held) -> READ -> FINISH -> IDLE
// The EOC token is already injected during HEADER, so the first pixel word
// follows the header without a gap. dout is registered: a word appears the
// clock after the bus carried it. A triggered event with no hits sends a
// header only; in continuous mode crossings without hits send nothing. The
// word format, state sequence and token protocol are this design's choices;
// the blocks and signals follow the FPIX1 chip control logic.
module readout_controller
  import fpix1_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cont_mode,
  input  logic                 chip_has_data,
  input  logic                 rbco_valid,
  input  logic [BCO_W-1:0]     rbco,
  input  logic [CHIP_ID_W-1:0] chip_id,
  input  logic                 chip_token_in,
  input  logic                 eoc_token_return,
  input  logic                 chip_bus_valid,
  input  chip_word_t           chip_bus_word,
  output logic                 eoc_token,
  output logic                 chip_token_out,
  output out_word_t            dout,
  output logic                 dout_valid,
  output logic                 busy,
  output logic                 done
);

  typedef enum logic [2:0] {S_IDLE, S_ARB, S_HEADER, S_READ, S_FINISH} state_t;
  state_t state;

  logic             event_ready;
  logic [ADC_W-1:0] adc_code;

  adc_encoder u_enc (.therm(chip_bus_word.cw.therm), .code(adc_code));

  always_comb begin
    event_ready    = cont_mode ? chip_has_data : rbco_valid;
    eoc_token      = state == S_HEADER || state == S_READ;
    busy           = state == S_ARB || state == S_HEADER || state == S_READ;
    done           = state == S_FINISH;
    chip_token_out = chip_token_in && !busy && !event_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      unique case (state)
        S_IDLE:   if (event_ready) state <= S_ARB;
        S_ARB:    if (chip_token_in) state <= S_HEADER;
        S_HEADER: begin
          dout       <= make_header_word(chip_id, rbco);
          dout_valid <= 1'b1;
          state      <= eoc_token_return ? S_FINISH : S_READ;
        end
        S_READ: begin
          if (chip_bus_valid) begin
            dout       <= make_hit_word(chip_bus_word.col, chip_bus_word.cw.row, adc_code);
            dout_valid <= 1'b1;
          end
          if (eoc_token_return) state <= S_FINISH;
        end
        S_FINISH: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

endmodule
