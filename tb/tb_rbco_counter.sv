// tb_rbco_counter: continuous mode against a reference counter (never closer
// than 2 behind CBCO, advances one per clock only while no column has data
// and the readout is idle, catches up quickly after a stall); triggered mode:
// trigger loads the external number, valid until done, triggers while
// pending are dropped.
module tb_rbco_counter;
  import fpix1_pkg::*;
  logic clk = 0, rst_n = 0, cont_mode = 1, chip_has_data = 0, busy = 0, done = 0, ext_trig = 0;
  logic [BCO_W-1:0] cbco = '0, ext_rbco = '0, rbco, ref_cnt, ref_ext;
  logic rbco_valid, trig_ready, ref_valid;
  int checks = 0, failures = 0, catchups = 0;

  rbco_counter dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ref_cnt = 6'd62;
    check("reset value", int'(rbco), 62);
    // continuous mode
    for (int i = 0; i < 2000; i++) begin
      logic [BCO_W-1:0] gap;
      chip_has_data = $urandom_range(0, 9) < (i % 400 < 200 ? 8 : 1);
      busy = $urandom_range(0, 5) == 0;
      gap = cbco - ref_cnt;
      if (!chip_has_data && !busy && gap > 2) begin
        ref_cnt = ref_cnt + 1;
        if (gap > 3) catchups++;
      end
      @(posedge clk);
      #1;
      if (i % 4 == 3) cbco = cbco + 1;
      check("rbco", int'(rbco), int'(ref_cnt));
      check("valid", int'(rbco_valid), 1);
      checks++;
      if (BCO_W'(cbco - rbco) < 2) begin failures++; $display("closer than 2"); end
    end
    check("catch-up seen", int'(catchups > 0), 1);
    // triggered mode
    cont_mode = 0; chip_has_data = 0; busy = 0; #1;
    check("not valid", int'(rbco_valid), 0);
    check("ready", int'(trig_ready), 1);
    for (int i = 0; i < 50; i++) begin
      logic [BCO_W-1:0] b, b2;
      b = BCO_W'($urandom);
      ext_rbco = b; ext_trig = 1;
      @(posedge clk); #1;
      b2 = b + 7;
      ext_rbco = b2;                         // second trigger while pending
      check("rbco = trigger", int'(rbco), int'(b));
      check("valid", int'(rbco_valid), 1);
      check("busy-ready", int'(trig_ready), 0);
      repeat ($urandom_range(1, 5)) @(posedge clk);
      #1 check("kept", int'(rbco), int'(b));
      ext_trig = 0; done = 1;
      @(posedge clk); #1 done = 0;
      check("cleared", int'(rbco_valid), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
