// Self-checking test of counter8: random increments; after every burst the
// settled count must equal the number of increments mod 256, and cout must
// pulse exactly in the cycle after the edge that took the 256th, 512th, ...
// increment (the high nibble wraps one cycle after the low nibble).
//
// Timing: inputs change on the falling clock edge and outputs are sampled
// before the next rising edge. The split counter with its delayed carry is
// the chip's; the exact cycle of cout follows this design's counter8.
module tb_counter8;
  logic clk = 0, bnr, inc;
  logic [7:0] count;
  logic cout;
  int checks = 0, failures = 0;
  int total = 0;
  int expect_cout_at = -1;
  int cyc = 0;

  counter8 dut (.clk, .bnr, .inc, .count, .cout);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  // cout checker: sampled between rising edges
  always @(negedge clk) if (bnr) begin
    if (cout) begin
      checks++;
      if (cyc != expect_cout_at) begin
        failures++;
        $display("FAIL cout at cycle %0d, expected %0d", cyc, expect_cout_at);
      end
    end else if (cyc == expect_cout_at) begin
      checks++;
      failures++;
      $display("FAIL missing cout at cycle %0d", cyc);
    end
  end

  initial begin
    int pulses_expected;
    bnr = 0; inc = 0;
    repeat (2) @(negedge clk);
    bnr = 1;
    for (int burst = 0; burst < 40; burst++) begin
      int len;
      len = $urandom_range(300, 1);
      for (int k = 0; k < len; k++) begin
        inc = ($urandom_range(3) != 0);
        if (inc) begin
          total++;
          // this increment is taken at the next rising edge; cout then
          // shows right after it
          if (total % 256 == 0) expect_cout_at = cyc + 1;
        end
        @(negedge clk);
      end
      inc = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (count !== 8'(total)) begin
        failures++;
        $display("FAIL count=%0d expected %0d", count, total % 256);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
