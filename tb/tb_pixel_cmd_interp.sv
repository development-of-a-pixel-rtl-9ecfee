// tb_pixel_cmd_interp: directed scenarios for the pixel command interpreter:
// association with the set issuing "look for data", HFastOR, commands of
// other sets ignored, output -> bus request/RFastOR, read and reset clear
// the hit, throttle and kill block new hits, no hit without look-for-data.
module tb_pixel_cmd_interp;
  import fpix1_pkg::*;
  logic clk = 0, rst_n = 0, disc = 0, kill = 0, throttle = 0, read = 0;
  cmd_t cmd [N_SETS];
  logic hfast, rfast, hit, capture;
  int checks = 0, failures = 0;

  pixel_cmd_interp dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  task automatic set_all(cmd_t c);
    for (int s = 0; s < N_SETS; s++) cmd[s] = c;
  endtask

  // one disc pulse in the cycle before the next edge
  task automatic pulse;
    disc = 1;
    #1;
    @(posedge clk);
    #1 disc = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_all(CMD_IDLE);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 1. hit while nobody looks: ignored
    disc = 1; #1;
    check("hfast no look", hfast, 0);
    @(posedge clk); #1 disc = 0;
    check("hit no look", hit, 0);
    // 2. set 2 looks; hit associates with set 2
    cmd[2] = CMD_LOOK;
    disc = 1; #1;
    check("hfast on new hit", hfast, 1);
    check("capture on new hit", capture, 1);
    @(posedge clk); #1 disc = 0;
    check("hit stored", hit, 1);
    check("hfast while set looks", hfast, 1);
    cmd[2] = CMD_IDLE; cmd[1] = CMD_LOOK; #1;
    check("hfast after set stops looking", hfast, 0);
    // 3. other sets' output/reset are ignored
    cmd[1] = CMD_IDLE; cmd[0] = CMD_OUTPUT; cmd[3] = CMD_RESET; #1;
    check("rfast other set output", rfast, 0);
    @(posedge clk); #1;
    check("hit survives other reset", hit, 1);
    // 4. own output -> request, read clears
    set_all(CMD_IDLE); cmd[2] = CMD_OUTPUT; #1;
    check("rfast own output", rfast, 1);
    @(posedge clk); #1;
    check("hit kept until read", hit, 1);
    read = 1;
    @(posedge clk); #1 read = 0;
    check("hit cleared by read", hit, 0);
    check("rfast dropped", rfast, 0);
    // 5. new hit with set 0 looking, then reset from set 0
    set_all(CMD_IDLE); cmd[0] = CMD_LOOK;
    pulse();
    check("second hit", hit, 1);
    cmd[0] = CMD_RESET; cmd[1] = CMD_LOOK; #1;
    check("no hfast on reset", hfast, 0);
    @(posedge clk); #1;
    check("hit cleared by reset", hit, 0);
    // 6. throttle blocks new hits
    set_all(CMD_IDLE); cmd[1] = CMD_LOOK; throttle = 1;
    pulse();
    check("throttled", hit, 0);
    throttle = 0;
    // 7. kill blocks new hits
    kill = 1;
    pulse();
    check("killed", hit, 0);
    kill = 0;
    // 8. association with set 1 now; set 2 output ignored, set 1 output seen
    pulse();
    check("hit set1", hit, 1);
    set_all(CMD_IDLE); cmd[2] = CMD_OUTPUT; #1;
    check("set2 output ignored", rfast, 0);
    cmd[2] = CMD_IDLE; cmd[1] = CMD_OUTPUT; #1;
    check("set1 output seen", rfast, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
