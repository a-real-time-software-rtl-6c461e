// Self-checking test of clk_div4: clk4 must have a period of four clocks
// (falling when the phase wraps), and the three edge enables must each be
// high once per four clocks: nclk4 two cycles and clk4d three cycles after
// clk4's falling edge enable.
//
// Timing: 10 ns clock, checks at every falling edge after reset release.
// The period of four comes from the chip; the enable positions checked are
// this design's choice of where the slow-clock edges fall.
module tb_clk_div4;
  logic clk = 0, bnr;
  logic clk4, clk4_fall, nclk4_fall, clk4d_fall;
  int checks = 0, failures = 0;

  clk_div4 dut (.clk, .bnr, .clk4, .clk4_fall, .nclk4_fall, .clk4d_fall);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic prev_clk4;
    int last_fall_edge;
    bnr = 0;
    repeat (3) @(negedge clk);
    bnr = 1;
    cyc = 0;
    last_fall_edge = -1;
    prev_clk4 = clk4;
    for (int n = 0; n < 200; n++) begin
      // expected phase after reset: 0,1,2,3,0,...
      int ph;
      ph = n % 4;
      checks++;
      if ({clk4_fall, nclk4_fall, clk4d_fall, clk4} !==
          {ph == 3, ph == 1, ph == 0, ph >= 2}) begin
        failures++;
        $display("FAIL cycle %0d: fall=%0d nfall=%0d dfall=%0d clk4=%0d", n,
                 clk4_fall, nclk4_fall, clk4d_fall, clk4);
      end
      @(negedge clk);
      if (prev_clk4 && !clk4) begin
        checks++;
        if (last_fall_edge >= 0 && n - last_fall_edge != 4) begin
          failures++;
          $display("FAIL clk4 period %0d", n - last_fall_edge);
        end
        last_fall_edge = n;
      end
      prev_clk4 = clk4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
