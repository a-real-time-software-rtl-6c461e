// Self-checking test of range_recognizer.
// The valid/en_timer/chip_mode flags are registered here as the input
// section does. A behavioural reference, written per address without any
// pipeline, keeps the active bit and the two full counts:
//   valid address:  exit  = active & (outside | address == lower limit)
//                   active = inside
//   invalid address: active unchanged
//   address/time count += active & (chip_mode ? en_timer : valid)
//   entry/exit count   += exit
// Phases: the limits of the worked example (0xFFFFFF2..0xFFFFFF8) with a
// held in-range address and with two alternating addresses; the latency
// of one address (counted at the fifth clock edge); random ranges with
// addresses clustered on the limits in count-address mode and in
// time-a-range mode. After each phase the low bytes (directly and through
// the read-out byte) and the number of carry-out pulses are compared.
//
// Timing: one address per clock, applied on the falling edge. The equations
// of the reference are the chip's; the random traffic is ours.
module tb_range_recognizer;
  import rtspa_pkg::*;
  logic clk = 0, bnr;
  logic [31:0] a;
  logic prg_lat, limit, strb, valid, en_timer, read_sel, eccnt;
  logic valid_q, en_timer_q;
  chip_mode_e chip_mode, chip_mode_q;
  logic cc_cout, ec_cout;
  logic [7:0] cc_low, ec_low, rd_byte;
  int checks = 0, failures = 0;

  range_recognizer dut (.clk, .bnr, .a, .prg_lat, .limit, .strb, .valid_q,
    .en_timer_q, .chip_mode_q, .read_sel, .eccnt, .cc_cout, .ec_cout,
    .cc_low, .ec_low, .rd_byte);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    valid_q     <= valid;
    en_timer_q  <= en_timer;
    chip_mode_q <= chip_mode;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cc_pulses = 0, ec_pulses = 0;
  always @(negedge clk) if (bnr) begin
    if (cc_cout) cc_pulses++;
    if (ec_cout) ec_pulses++;
  end

  // reference model
  logic [31:0] r_ll, r_ul;
  bit   r_active;
  longint r_cc, r_ec;

  task automatic ref_step(input logic [31:0] x, input bit v, input bit et, input chip_mode_e cm);
    bit in_r, ex, incf;
    in_r = (x >= r_ll) && (x <= r_ul);
    if (v) begin
      ex = r_active && (!in_r || x == r_ll);
      r_active = in_r;
      if (ex) r_ec++;
    end
    incf = (cm == TIME_A_RANGE) ? et : v;
    if (r_active && incf) r_cc++;
  endtask

  task automatic program_limits(input logic [31:0] lo, input logic [31:0] hi);
    @(negedge clk);
    prg_lat = 1; limit = 0; a = lo;
    @(negedge clk) strb = 1;
    @(negedge clk) strb = 0;
    limit = 1; a = hi;
    @(negedge clk) strb = 1;
    @(negedge clk) strb = 0;
    prg_lat = 0;
    r_ll = lo; r_ul = hi;
  endtask

  task automatic drive(input logic [31:0] x, input bit v, input bit et);
    @(negedge clk);
    a = x; valid = v; en_timer = et;
    ref_step(x, v, et, chip_mode);
  endtask

  task automatic idle_and_check(input string what);
    @(negedge clk);
    valid = 0; en_timer = 0;
    repeat (8) @(negedge clk);
    checks += 4;
    if (cc_low !== 8'(r_cc) || ec_low !== 8'(r_ec)) begin
      failures++;
      $display("FAIL %s: low counts %0d/%0d, expected %0d/%0d", what, cc_low, ec_low,
               r_cc % 256, r_ec % 256);
    end
    if (cc_pulses != r_cc / 256 || ec_pulses != r_ec / 256) begin
      failures++;
      $display("FAIL %s: carry pulses %0d/%0d, expected %0d/%0d", what, cc_pulses, ec_pulses,
               r_cc / 256, r_ec / 256);
    end
    read_sel = 1; eccnt = 0; #1;
    if (rd_byte !== 8'(r_cc)) begin failures++; $display("FAIL %s: read-out cc", what); end
    eccnt = 1; #1;
    if (rd_byte !== 8'(r_ec)) begin failures++; $display("FAIL %s: read-out ec", what); end
    read_sel = 0; #1;
    if (rd_byte !== 8'h00) begin failures++; $display("FAIL %s: bus not released", what); end
  endtask

  function automatic logic [31:0] pick_addr();
    case ($urandom_range(9))
      0: return r_ll - 1;
      1: return r_ll;
      2: return r_ll + 1;
      3: return r_ul - 1;
      4: return r_ul;
      5: return r_ul + 1;
      6, 7: return r_ll + $urandom_range(r_ul - r_ll);
      default: return $urandom;
    endcase
  endfunction

  initial begin
    bnr = 0; a = 0; prg_lat = 0; limit = 0; strb = 0; valid = 0; en_timer = 0;
    read_sel = 0; eccnt = 0; chip_mode = COUNT_ADDR;
    r_active = 0; r_cc = 0; r_ec = 0;
    repeat (3) @(negedge clk);
    bnr = 1;

    // worked example limits
    program_limits(32'h0FFFFFF2, 32'h0FFFFFF8);
    for (int n = 0; n < 300; n++) drive(32'h0FFFFFF6, 1, 0);
    idle_and_check("held address");
    for (int n = 0; n < 600; n++) drive(n % 2 ? 32'h0FFFFFFC : 32'h0FFFFFF7, 1, 0);
    idle_and_check("alternating addresses");

    // latency of a single address: counted at the fifth edge
    begin
      logic [7:0] cc_before;
      cc_before = cc_low;
      drive(32'h0FFFFFF3, 1, 0);       // taken at the next edge (edge 1)
      @(negedge clk) valid = 0;
      repeat (2) @(negedge clk);       // after edge 3
      checks++;
      if (cc_low !== cc_before) begin failures++; $display("FAIL counted too early"); end
      @(negedge clk);                  // after edge 4
      checks++;
      if (cc_low !== cc_before) begin failures++; $display("FAIL counted too early (edge 4)"); end
      @(negedge clk);                  // after edge 5
      checks++;
      if (cc_low !== cc_before + 8'd1) begin failures++; $display("FAIL not counted at edge 5"); end
      drive(32'h0, 1, 0);              // leave the range
      idle_and_check("latency");
    end

    // random ranges, both modes
    for (int r = 0; r < 12; r++) begin
      logic [31:0] lo, hi;
      lo = $urandom;
      hi = lo + $urandom_range(r % 3 == 0 ? 3 : 5000);
      if (hi < lo) hi = 32'hFFFFFFFF;
      program_limits(lo, hi);
      chip_mode = (r % 2) ? TIME_A_RANGE : COUNT_ADDR;
      for (int n = 0; n < 2000; n++) begin
        bit v;
        v = ($urandom_range(3) != 0);
        drive(pick_addr(), v, $urandom_range(1));
      end
      idle_and_check($sformatf("random range %0d", r));
    end

    $display("counts: address/time %0d, entry/exit %0d", r_cc, r_ec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
