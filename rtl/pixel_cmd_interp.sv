// pixel_cmd_interp: command interpreter of an FPIX1 pixel cell.
//
// Every pixel watches the four pairs of command lines of its column, one pair
// per EOC set. When the (unkilled) discriminator fires while a set issues
// "look for data" and throttle is low, the pixel stores the hit and
// associates itself with that set; from then on it obeys only that set.
// It asserts its HFastOR contribution in the cycle it takes the hit and for
// as long as its set still issues "look for data". When its set issues
// "output" it requests the column bus (rfast, its RFastOR contribution);
// when it is read (read high at a clock edge) or its set issues "reset", it
// clears itself. Throttle blocks new hits only.
//
// The real cell takes a hit asynchronously; here the discriminator is sampled
// on the readout clock, and HFastOR follows the discriminator combinationally
// so the EOC set stamps the crossing in which the pixel fired. If several
// sets issued "look for data" (which the EOC logic prevents), the lowest wins.
module pixel_cmd_interp
  import fpix1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  disc,
  input  logic  kill,
  input  logic  throttle,
  input  cmd_t  cmd [N_SETS],
  input  logic  read,      // bus controller reads this pixel at this edge
  output logic  hfast,
  output logic  rfast,
  output logic  hit,
  output logic  capture    // ADC flip-flops may be set
);

  localparam int unsigned SET_W = $clog2(N_SETS);

  logic [SET_W-1:0] assoc;
  logic             look_any;
  logic [SET_W-1:0] look_idx;
  logic             new_hit;
  cmd_t             my_cmd;

  always_comb begin
    look_any = 1'b0;
    look_idx = '0;
    for (int s = N_SETS - 1; s >= 0; s--)
      if (cmd[s] == CMD_LOOK) begin
        look_any = 1'b1;
        look_idx = SET_W'(s);
      end
    my_cmd  = cmd[assoc];
    new_hit = !hit && disc && !kill && !throttle && look_any;
    hfast   = new_hit || (hit && my_cmd == CMD_LOOK);
    rfast   = hit && my_cmd == CMD_OUTPUT;
    capture = hfast;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hit   <= 1'b0;
      assoc <= '0;
    end else if (hit) begin
      if (my_cmd == CMD_RESET || read) hit <= 1'b0;
    end else if (new_hit) begin
      hit   <= 1'b1;
      assoc <= look_idx;
    end
  end

endmodule
