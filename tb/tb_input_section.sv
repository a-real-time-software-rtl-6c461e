// Self-checking test of input_section: reset release after four edges,
// flag registers (one clock of delay, cleared by reset) and the
// programming decoder (one-hot of d only while prg_chip is high).
//
// Timing: inputs change on the falling clock edge. The four-stage reset
// chain and the decoder are the chip's; the active-high reset pin and the
// cleared flags are this design's reading.
module tb_input_section;
  import rtspa_pkg::*;
  logic clk = 0, nr, valid, en_timer, prg_chip;
  chip_mode_e chip_mode, chip_mode_q;
  logic [3:0] d;
  logic bnr, valid_q, en_timer_q;
  logic [15:0] prg_lat;
  int checks = 0, failures = 0;

  input_section dut (.clk, .nr, .valid, .en_timer, .chip_mode, .prg_chip, .d,
                     .bnr, .valid_q, .en_timer_q, .chip_mode_q, .prg_lat);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pv, pe;
    chip_mode_e pc;
    nr = 0;
    #1 nr = 1;   // a real edge, so the asynchronous reset acts before the first clock
    valid = 1; en_timer = 1; chip_mode = TIME_A_RANGE; prg_chip = 0; d = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (bnr !== 0 || valid_q !== 0 || en_timer_q !== 0 || chip_mode_q !== COUNT_ADDR) begin
      failures++; $display("FAIL reset state");
    end
    nr = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (bnr !== 0) begin failures++; $display("FAIL reset released early"); end
    @(negedge clk);
    checks++;
    if (bnr !== 1) begin failures++; $display("FAIL reset not released after 4 edges"); end
    @(negedge clk);   // first edge with the flag registers out of reset
    for (int n = 0; n < 500; n++) begin
      pv = valid; pe = en_timer; pc = chip_mode;
      valid = $urandom_range(1);
      en_timer = $urandom_range(1);
      chip_mode = chip_mode_e'($urandom_range(1));
      prg_chip = $urandom_range(1);
      d = $urandom_range(15);
      #1;
      checks++;
      if (prg_lat !== (prg_chip ? (16'h1 << d) : 16'h0)) begin
        failures++; $display("FAIL prg_lat=%h prg_chip=%0d d=%0d", prg_lat, prg_chip, d);
      end
      checks++;
      if (valid_q !== pv || en_timer_q !== pe || chip_mode_q !== pc) begin
        failures++; $display("FAIL flag registers");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
