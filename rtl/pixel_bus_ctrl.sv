// pixel_bus_ctrl: bus controller of an FPIX1 pixel cell.
//
// The column token enters at token_in. A cell that does not request the bus
// passes it straight on (combinationally, so the token skips empty cells);
// a requesting cell keeps it. On the next rising readout-clock edge at which
// advance is high (its end-of-column logic holds the chip-wide EOC token), the
// cell with the token loads its row address and ADC bits into its bus
// register and drives the column bus for one clock; read tells the command
// interpreter to clear the hit, which drops the request and hands the token
// to the next requesting cell in the same edge. So one pixel per readout
// clock. The tri-state column bus is modelled as a wired-OR: a cell that is
// not driving outputs zero. Gating reads with advance is this design's choice.
module pixel_bus_ctrl
  import fpix1_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req,
  input  logic               token_in,
  input  logic               advance,
  input  logic [ROW_W-1:0]   row_addr,
  input  logic [ADC_CMP-1:0] adc,
  output logic               token_out,
  output logic               read,
  output logic               bus_valid,
  output col_word_t          bus_word
);

  assign token_out = token_in && !req;
  assign read      = token_in && req && advance;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_valid <= 1'b0;
      bus_word  <= '0;
    end else begin
      bus_valid <= read;
      bus_word  <= read ? col_word_t'{row: row_addr, therm: adc} : '0;
    end
  end

endmodule
