// Self-checking test of priority_resolver, driven with the slow-clock
// enables of clk_div4.
// Carry-out pulses are issued at random (no recognizer more often than once
// per 256 clocks, the fastest a low counter can carry) and in bursts where
// all 16 recognizers carry in the same cycle. Checked:
//   * rcc is never more than one-hot;
//   * every pulse is forwarded exactly once;
//   * a grant never skips a lower-numbered request that was already held
//     when the requests were sampled;
//   * every request is served within 16 slow cycles plus the pipeline
//     (16*4 + 8 clocks), so no carry is ever lost in the worst case.
//
// Timing: carry pulses are applied on the falling clock edge for one
// cycle. Lowest-number-first priority and the hold flip-flops are the
// chip's; the 8-clock pipeline allowance follows this design's enables.
module tb_priority_resolver;
  localparam int N = 16;
  logic clk = 0, bnr;
  logic clk4, clk4_fall, nclk4_fall, clk4d_fall;
  logic [N-1:0] cout, pend, cc, rcc;
  int checks = 0, failures = 0;

  clk_div4 u_div (.clk, .bnr, .clk4, .clk4_fall, .nclk4_fall, .clk4d_fall);
  priority_resolver #(.N(N)) dut (.clk, .bnr, .clk4_fall, .nclk4_fall, .cout, .pend, .cc, .rcc);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edges = 0;
  always @(posedge clk) edges++;

  int  pulses [N], grants [N];
  int  pulse_edge [N];          // edge at which the outstanding pulse was taken
  int  last_pulse [N];
  bit  outstanding [N];
  bit  prev_nfall = 0, prev_fall = 0;
  int  sample_edge = 0;
  int  bursts_served = 0;

  // monitor, between rising edges
  always @(negedge clk) if (bnr) begin
    checks++;
    if ((rcc & (rcc - 1)) != 0) begin
      failures++;
      $display("FAIL rcc not one-hot: %h", rcc);
    end
    if (prev_fall) sample_edge = edges;
    if (prev_nfall && rcc != 0) begin
      int i;
      i = $clog2(rcc);
      grants[i]++;
      checks++;
      if (!outstanding[i]) begin
        failures++;
        $display("FAIL grant to %0d without a request", i);
      end
      for (int jj = 0; jj < i; jj++)
        if (outstanding[jj] && pulse_edge[jj] < sample_edge) begin
          failures++;
          $display("FAIL grant to %0d skipped %0d", i, jj);
        end
      checks++;
      if (edges - pulse_edge[i] > N*4 + 8) begin
        failures++;
        $display("FAIL request %0d waited %0d clocks", i, edges - pulse_edge[i]);
      end
      outstanding[i] = 0;
    end
    prev_nfall = nclk4_fall;
    prev_fall  = clk4_fall;
  end

  initial begin
    bnr = 0;
    cout = '0;
    for (int i = 0; i < N; i++) begin
      pulses[i] = 0; grants[i] = 0; outstanding[i] = 0; last_pulse[i] = -1000;
    end
    repeat (3) @(negedge clk);
    bnr = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      #1;
      cout = '0;
      for (int i = 0; i < N; i++) begin
        bit all;
        all = (n % 3000 == 100);          // every recognizer at once
        if ((all || $urandom_range(300) == 0) && edges - last_pulse[i] >= 256) begin
          cout[i] = 1'b1;
          pulses[i]++;
          last_pulse[i] = edges + 1;
          pulse_edge[i] = edges + 1;
          outstanding[i] = 1;
        end
      end
    end
    @(negedge clk) cout = '0;
    repeat (200) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (pulses[i] != grants[i]) begin
        failures++;
        $display("FAIL recognizer %0d: %0d carries, %0d grants", i, pulses[i], grants[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
