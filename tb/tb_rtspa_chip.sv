// End-to-end test of the whole chip at its full size (16 recognizers,
// 48-bit address/time and 32-bit entry/exit counts), driven only through
// the pins.
//
// A behavioural reference keeps, for every recognizer, the full counts:
//   valid address:  exit  = active & (outside | address == lower limit)
//                   active = inside   (lower <= address <= upper)
//   invalid address: active unchanged
//   address/time count += active & (chip_mode ? en_timer : valid)
//   entry/exit count   += exit
// Phases:
//   1. reset, then all 16 recognizers programmed with the same range
//      (0xFFFFFF2..0xFFFFFF8) so that every low counter carries in the same
//      cycle and the priority resolver must queue 16 requests;
//   2. the latency of one address: the low byte seen on c_out changes at
//      the fifth clock edge after the address is applied;
//   3. sixteen different, partly overlapping ranges with random traffic in
//      count-address mode, then in time-a-range mode;
//   4. RAM test writes: a distinct pattern into recognizer 7's counts, and
//      all ones into the upper bits of recognizer 3's counts, followed by
//      traffic that makes both wrap;
//   5. read-out of every byte of every count through c_out, synchronized
//      to the clk4 pin.
// Each mechanism (simultaneous carries, queued requests, exits,
// re-entries at the lower limit, timed cycles with invalid addresses, mode
// switch, test writes, 40- and 24-bit wrap, read-outs) is counted and must
// occur at least once.
//
// Timing: pins change on the falling edge of clk; a read-out selection is
// applied in the first half cycle after a falling edge of the clk4 pin and
// the byte is sampled after the next falling edge of clk4. The
// pin protocol and the counting rules are the chip's; the reset polarity
// is this design's choice.
module tb_rtspa_chip;
  import rtspa_pkg::*;
  localparam int N = NUM_RR;

  logic clk = 0, nr;
  logic [31:0] a;
  logic valid, en_timer, prg_chip, limit, strb, ren, wen, eccnt, strb2;
  chip_mode_e chip_mode;
  logic [3:0] d, m;
  logic [2:0] enr;
  logic [7:0] c_in, c_out;
  logic c_oe, clk4;
  int checks = 0, failures = 0;

  rtspa_chip dut (.clk, .nr, .a, .valid, .en_timer, .chip_mode, .prg_chip,
    .limit, .strb, .d, .ren, .wen, .eccnt, .strb2, .enr, .m, .c_in,
    .c_out, .c_oe, .clk4);

  always #5 clk = ~clk;   // 10 ns

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [31:0]  r_ll [N], r_ul [N];
  bit           r_active [N];
  logic [47:0]  r_cc [N];
  logic [31:0]  r_ec [N];

  // mechanism counters
  int n_exit = 0, n_reentry = 0, n_timed_invalid = 0, n_mode_switch = 0;
  int n_testwrite = 0, n_wrap40 = 0, n_wrap24 = 0, n_readout = 0;
  int n_grant_cc = 0, n_grant_ec = 0, n_queued = 0, n_all_carry = 0;

  task automatic ref_step(input logic [31:0] x, input bit v, input bit et, input chip_mode_e cm);
    for (int i = 0; i < N; i++) begin
      bit in_r, ex, incf;
      in_r = (x >= r_ll[i]) && (x <= r_ul[i]);
      if (v) begin
        ex = r_active[i] && (!in_r || x == r_ll[i]);
        if (ex && in_r) n_reentry++;
        r_active[i] = in_r;
        if (ex) begin
          n_exit++;
          if (r_ec[i] == 32'hFFFFFFFF) n_wrap24++;
          r_ec[i]++;
        end
      end
      incf = (cm == TIME_A_RANGE) ? et : v;
      if (r_active[i] && incf) begin
        if (!v) n_timed_invalid++;
        if (r_cc[i] == 48'hFFFFFFFFFFFF) n_wrap40++;
        r_cc[i]++;
      end
    end
  endtask

  // ---------------- observation of internal activity ----------------
  always @(negedge clk) if (dut.bnr) begin
    if (dut.clk4_fall) begin
      logic [N-1:0] p;
      p = dut.cc_pend;
      if ($countones(p) >= 2) n_queued++;
    end
    if (dut.nclk4_fall) begin
      if (dut.u_pri_cc.pri != 0) n_grant_cc++;
      if (dut.u_pri_ec.pri != 0) n_grant_ec++;
    end
    if (&dut.cc_cout) n_all_carry++;
  end

  // ---------------- pin-level tasks ----------------
  task automatic program_limit(input int i, input bit up, input logic [31:0] v);
    @(negedge clk);
    prg_chip = 1; d = 4'(i); limit = up; a = v; valid = 0;
    @(negedge clk) strb = 1;
    @(negedge clk) strb = 0;
    @(negedge clk) prg_chip = 0;
    if (up) r_ul[i] = v; else r_ll[i] = v;
  endtask

  task automatic bus_cycle(input logic [31:0] x, input bit v, input bit et);
    @(negedge clk);
    a = x; valid = v; en_timer = et;
    ref_step(x, v, et, chip_mode);
  endtask

  task automatic set_mode(input chip_mode_e cm);
    @(negedge clk);
    if (cm != chip_mode) n_mode_switch++;
    chip_mode = cm;
    valid = 0; en_timer = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic drain();
    @(negedge clk);
    valid = 0; en_timer = 0;
    repeat (200) @(negedge clk);   // longer than 16 queued slow cycles + pipeline
  endtask

  // wait for n falling edges of the clk4 pin
  task automatic clk4_falls(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk4);
      @(negedge clk);
    end
  endtask

  task automatic read_byte(input int i, input bit ec, input int b, output logic [7:0] v);
    // apply the selection just after a falling edge of clk4 (well within
    // the 20 ns window); the byte is on c_out after the next falling edge
    @(negedge clk4);
    @(negedge clk);
    ren = 1; eccnt = ec; m = 4'(i); enr = 3'(b);
    clk4_falls(1);
    v = c_out;
    n_readout++;
    checks++;
    if (c_oe !== 1'b1) begin failures++; $display("FAIL c_oe low during read-out"); end
  endtask

  task automatic test_write(input int i, input bit ec, input logic [39:0] v);
    @(negedge clk);
    valid = 0; en_timer = 0;
    prg_chip = 1; wen = 1; eccnt = ec; m = 4'(i);
    a = v[31:0]; c_in = v[39:32];
    @(negedge clk) strb2 = 1;
    repeat (2) @(negedge clk);
    strb2 = 0;
    @(negedge clk);
    wen = 0; prg_chip = 0;
    n_testwrite++;
    if (ec) r_ec[i] = {v[23:0], r_ec[i][7:0]};
    else    r_cc[i] = {v, r_cc[i][7:0]};
  endtask

  task automatic check_all(input string what);
    logic [7:0] v;
    for (int i = 0; i < N; i++) begin
      for (int b = 0; b < 6; b++) begin
        read_byte(i, 0, b, v);
        checks++;
        if (v !== r_cc[i][b*8 +: 8]) begin
          failures++;
          $display("FAIL %s: rr %0d address/time byte %0d = %h, expected %h (count %h)",
                   what, i, b, v, r_cc[i][b*8 +: 8], r_cc[i]);
        end
      end
      for (int b = 0; b < 4; b++) begin
        read_byte(i, 1, b, v);
        checks++;
        if (v !== r_ec[i][b*8 +: 8]) begin
          failures++;
          $display("FAIL %s: rr %0d entry/exit byte %0d = %h, expected %h (count %h)",
                   what, i, b, v, r_ec[i][b*8 +: 8], r_ec[i]);
        end
      end
    end
    @(negedge clk) ren = 0;
  endtask

  function automatic logic [31:0] pick_addr(input int i);
    case ($urandom_range(9))
      0: return r_ll[i] - 1;
      1: return r_ll[i];
      2: return r_ll[i] + 1;
      3: return r_ul[i] - 1;
      4: return r_ul[i];
      5: return r_ul[i] + 1;
      6, 7, 8: return r_ll[i] + $urandom_range(r_ul[i] - r_ll[i]);
      default: return $urandom;
    endcase
  endfunction

  initial begin
    nr = 0;
    #1 nr = 1;   // a real edge, so the asynchronous reset acts before the first clock
    a = 0; valid = 0; en_timer = 0; chip_mode = COUNT_ADDR; prg_chip = 0;
    limit = 0; strb = 0; d = 0; ren = 0; wen = 0; eccnt = 0; strb2 = 0; enr = 0;
    m = 0; c_in = 0;
    for (int i = 0; i < N; i++) begin
      r_active[i] = 0; r_cc[i] = 0; r_ec[i] = 0; r_ll[i] = '1; r_ul[i] = '0;
    end
    repeat (5) @(negedge clk);
    nr = 0;
    repeat (8) @(negedge clk);

    // 1. all ranges identical: simultaneous carries
    for (int i = 0; i < N; i++) begin
      program_limit(i, 0, 32'h0FFFFFF2);
      program_limit(i, 1, 32'h0FFFFFF8);
    end
    for (int n = 0; n < 300; n++) bus_cycle(32'h0FFFFFF6, 1, 0);
    for (int n = 0; n < 1200; n++) bus_cycle(n % 2 ? 32'h0FFFFFFC : 32'h0FFFFFF7, 1, 0);
    bus_cycle(32'h0, 1, 0);
    drain();
    check_all("identical ranges");

    // 2. latency of one address, seen on the low byte of recognizer 0
    begin
      logic [7:0] v0;
      @(negedge clk);
      ren = 1; eccnt = 0; m = 0; enr = 0;
      #1 v0 = c_out;
      bus_cycle(32'h0FFFFFF3, 1, 0);   // taken at the next edge (edge 1)
      @(negedge clk) valid = 0;         // after edge 1
      repeat (3) @(negedge clk);        // after edge 4
      checks++;
      if (c_out !== v0) begin failures++; $display("FAIL counted before edge 5"); end
      @(negedge clk);                   // after edge 5
      checks++;
      if (c_out !== v0 + 8'd1) begin failures++; $display("FAIL not counted at edge 5"); end
      @(negedge clk) ren = 0;
      bus_cycle(32'h0, 1, 0);
      drain();
    end

    // 3. distinct, partly overlapping ranges
    for (int i = 0; i < N; i++) begin
      logic [31:0] lo;
      lo = (i % 4 == 0) ? 32'h00010000 : 32'h00010000 + 32'($urandom_range(4000));
      program_limit(i, 0, lo);
      program_limit(i, 1, lo + 32'($urandom_range(i % 3 == 0 ? 2 : 3000)));
    end
    for (int phase = 0; phase < 2; phase++) begin
      set_mode(phase ? TIME_A_RANGE : COUNT_ADDR);
      for (int n = 0; n < 12000; n++)
        bus_cycle(pick_addr($urandom_range(N-1)), $urandom_range(3) != 0, $urandom_range(1));
      bus_cycle(32'h0, 1, 0);
      drain();
      check_all(phase ? "time a range" : "count addresses");
    end
    set_mode(COUNT_ADDR);

    // 4. test writes and wrap-around of recognizer 3's upper count bits
    test_write(7, 0, 40'h12_3456_789A);
    test_write(7, 1, 40'h00_00AB_CDEF);
    test_write(3, 0, 40'hFF_FFFF_FFFF);
    test_write(3, 1, 40'h00_00FF_FFFF);
    check_all("after test writes");
    for (int n = 0; n < 700; n++)
      bus_cycle(n % 2 ? r_ul[3] + 1 : r_ll[3], 1, 0);
    bus_cycle(32'h0, 1, 0);
    drain();
    check_all("after wrap");

    // mechanisms
    checks += 12;
    if (n_all_carry == 0)     begin failures++; $display("FAIL never all carries at once"); end
    if (n_queued == 0)        begin failures++; $display("FAIL never queued requests"); end
    if (n_grant_cc == 0)      begin failures++; $display("FAIL no address/time RAM increment"); end
    if (n_grant_ec == 0)      begin failures++; $display("FAIL no entry/exit RAM increment"); end
    if (n_exit == 0)          begin failures++; $display("FAIL no exits"); end
    if (n_reentry == 0)       begin failures++; $display("FAIL no re-entries"); end
    if (n_timed_invalid == 0) begin failures++; $display("FAIL no timed invalid cycles"); end
    if (n_mode_switch == 0)   begin failures++; $display("FAIL no mode switch"); end
    if (n_testwrite == 0)     begin failures++; $display("FAIL no test write"); end
    if (n_wrap40 == 0)        begin failures++; $display("FAIL no 48-bit count wrap"); end
    if (n_wrap24 == 0)        begin failures++; $display("FAIL no 32-bit count wrap"); end
    if (n_readout == 0)       begin failures++; $display("FAIL no read-out"); end
    $display("mechanisms: all-carry=%0d queued=%0d cc-increments=%0d ec-increments=%0d exits=%0d re-entries=%0d timed-invalid=%0d mode-switches=%0d test-writes=%0d wrap48=%0d wrap32=%0d read-outs=%0d",
             n_all_carry, n_queued, n_grant_cc, n_grant_ec, n_exit, n_reentry, n_timed_invalid,
             n_mode_switch, n_testwrite, n_wrap40, n_wrap24, n_readout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
