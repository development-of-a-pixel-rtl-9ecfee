// tb_eoc_set: directed scenarios for one EOC set: look for data while
// selected, timestamp load on HFastOR, switch to idle at the next crossing,
// output on SBCO == RBCO until RFastOR drops, no output without a valid
// RBCO, reset after the masked delay (2^k crossings for k compared low bits,
// 64 with the full mask) lasting one clock.
module tb_eoc_set;
  import fpix1_pkg::*;
  localparam int DIV = 4;   // readout clocks per crossing
  logic bco_en;
  logic clk = 0, rst_n = 0, rbco_valid = 0, lfd_sel = 0, hfast = 0, rfast = 0;
  logic [BCO_W-1:0] cbco = '0, rbco = '0, reset_mask = '1, sbco;
  cmd_t cmd;
  logic avail, has_data, outputting;
  int checks = 0, failures = 0, cyc = 0;

  eoc_set dut (.*);
  always #5 clk = ~clk;

  // crossing generator: bco_en in the last clock of each crossing
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bco_en) cbco <= cbco + 1'b1;
  end
  assign bco_en = rst_n && (cyc % DIV == DIV - 1);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  task automatic to_crossing_start;   // returns just after a bco edge
    do @(posedge clk); while (!(cyc % DIV == 0));
    #1;
  endtask

  task automatic take_hit(output logic [BCO_W-1:0] stamp);
    to_crossing_start();
    lfd_sel = 1; #1;
    check("look when selected", int'(cmd), int'(CMD_LOOK));
    check("avail", int'(avail), 1);
    stamp = cbco;
    hfast = 1; #1;
    check("not avail when hit", int'(avail), 0);
    @(posedge clk); #1 hfast = 0;
    check("sbco", int'(sbco), int'(stamp));
    lfd_sel = 0; #1;
    check("still look in crossing", int'(cmd), int'(CMD_LOOK));
    while (!bco_en) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    check("idle after crossing", int'(cmd), int'(CMD_IDLE));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BCO_W-1:0] st;
    int n;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1 check("idle when not selected", int'(cmd), int'(CMD_IDLE));
    // A. hit then output via RBCO
    take_hit(st);
    rbco = st; rbco_valid = 0;
    repeat (3) @(posedge clk); #1;
    check("no output without valid rbco", int'(cmd), int'(CMD_IDLE));
    rbco_valid = 1; #1;
    check("has_data on match", int'(has_data), 1);
    rfast = 1;
    @(posedge clk); #1;
    check("output", int'(cmd), int'(CMD_OUTPUT));
    repeat (3) @(posedge clk); #1;
    check("output held while rfast", int'(cmd), int'(CMD_OUTPUT));
    rfast = 0;
    @(posedge clk); #1;
    check("free after output", int'(cmd), int'(CMD_IDLE));
    check("avail after output", int'(avail), 1);
    rbco_valid = 0;
    // B. masked reset delay: compare 2 low bits -> reset 4 crossings later
    reset_mask = 6'b000011;
    take_hit(st);
    n = 0;
    while (cmd != CMD_RESET && n < 200) begin @(posedge clk); #1; n++; end
    check("reset after 4 crossings", int'(cbco), int'(BCO_W'(st + 4)));
    @(posedge clk); #1;
    check("reset one clock", int'(cmd), int'(CMD_IDLE));
    check("avail after reset", int'(avail), 1);
    // C. full mask: reset 64 crossings later
    reset_mask = '1;
    take_hit(st);
    n = 0;
    while (cmd != CMD_RESET && n < 2000) begin @(posedge clk); #1; n++; end
    check("full-mask reset at wrap", int'(cbco), int'(st));
    check("full-mask delay", n / DIV, 63);
    // D. hit in the clock of the crossing edge goes straight to idle
    @(posedge clk); #1;
    while (!bco_en) begin @(posedge clk); #1; end
    st = cbco;
    lfd_sel = 1; hfast = 1;
    @(posedge clk); #1 hfast = 0; lfd_sel = 0;
    check("edge hit stamp", int'(sbco), int'(st));
    check("edge hit idle", int'(cmd), int'(CMD_IDLE));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
