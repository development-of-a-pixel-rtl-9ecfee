// tb_eoc_priority_encoder: random availability patterns against a reference:
// selection changes only at bco_en, keeps the current set while available,
// else takes the lowest available set, else none.
module tb_eoc_priority_encoder;
  import fpix1_pkg::*;
  logic clk = 0, rst_n = 0, bco_en = 0;
  logic [N_SETS-1:0] avail = '0, lfd_sel, ref_sel;
  int checks = 0, failures = 0;

  eoc_priority_encoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ref_sel = 4'b0001;
    checks++;
    if (lfd_sel !== ref_sel) begin failures++; $display("reset value %b", lfd_sel); end
    for (int i = 0; i < 1000; i++) begin
      avail  = 4'($urandom);
      bco_en = $urandom_range(0, 1) == 1;
      @(posedge clk);
      if (bco_en && (ref_sel & avail) == 0) begin
        ref_sel = '0;
        for (int s = 0; s < N_SETS; s++)
          if (avail[s] && ref_sel == 0) ref_sel[s] = 1'b1;
      end
      #1;
      checks++;
      if (lfd_sel !== ref_sel) begin
        failures++;
        $display("step %0d avail=%b sel=%b expected %b", i, avail, lfd_sel, ref_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
