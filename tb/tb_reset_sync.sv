// Self-checking test of reset_sync: the synchronized reset bnr (active low)
// must assert as soon as nr rises and release exactly four clock edges after
// nr falls.
//
// Timing: nr is changed between clock edges. The four-flip-flop chain is
// the chip's; the active-high pin and asynchronous assertion are this
// design's reading.
module tb_reset_sync;
  logic clk = 0, nr, bnr;
  int checks = 0, failures = 0;

  reset_sync #(.STAGES(4)) dut (.clk, .nr, .bnr);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (bnr !== exp) begin
      failures++;
      $display("FAIL %s: bnr=%0d expected %0d", what, bnr, exp);
    end
  endtask

  initial begin
    nr = 0;
    #1 nr = 1;   // a real edge, so the asynchronous reset acts at once
    #1;
    check(1'b0, "held in reset");
    for (int trial = 0; trial < 5; trial++) begin
      @(negedge clk);
      nr = 0;
      for (int k = 1; k <= 4; k++) begin
        @(negedge clk);
        check(k == 4 ? 1'b1 : 1'b0, $sformatf("edge %0d after release", k));
      end
      repeat (trial + 2) @(negedge clk);
      check(1'b1, "stays released");
      #2 nr = 1;   // asynchronous assertion between edges
      #1 check(1'b0, "asynchronous assertion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
