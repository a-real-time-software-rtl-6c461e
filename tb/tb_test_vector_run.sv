// Replays the chip's own test-vector run at full size and checks the
// result.
//
// The run: reset; all 16 recognizers programmed with the range
// 0x0FFFFFF2..0x0FFFFFF8; every word of both RAMs test-written with all
// ones (so that the next carry of each count wraps its upper bits to zero);
// then, in time_a_range mode, a short sequence of addresses with valid and
// en_timer toggled, 300 cycles of the in-range address 0x0FFFFFF6, 300
// pairs alternating 0x0FFFFFF7 (inside) / 0x0FFFFFFC (outside), a tail of
// addresses on and around the limits; finally every byte of both counts of
// every recognizer is read out through c_out and compared with a
// behavioural reference (the same rules as in tb_rtspa_chip). Every count
// must have wrapped past its all-ones upper bits at least once where the
// reference says so.
//
// Interface and timing: drives the rtspa_chip pins only; inputs change
// after the falling edge of clk and each "run(n)" is n clock cycles, as in
// the vector listing. Bytes are sampled while the clk4 pin is low after a
// full clk4 period with the read selection held.
//
// Follows the document: the programming, test-write and counting sequence
// of the chip's test vectors. This design's choices: the reset pulse is
// asserted high; the alternating pair is taken as 0x0FFFFFF7 (inside)
// and 0x0FFFFFFC (outside), so that both counts move; the entry/exit bytes
// are read out as well as the address/time bytes; 200 idle cycles let
// the last carries reach the RAM before reading.
module tb_test_vector_run;
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

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] r_ll [N], r_ul [N];
  bit          r_active [N];
  logic [47:0] r_cc [N];
  logic [31:0] r_ec [N];
  int n_wrap48 = 0, n_wrap32 = 0;

  task automatic ref_step(input logic [31:0] x, input bit v, input bit et, input chip_mode_e cm);
    for (int i = 0; i < N; i++) begin
      bit in_r, ex, incf;
      in_r = (x >= r_ll[i]) && (x <= r_ul[i]);
      if (v) begin
        ex = r_active[i] && (!in_r || x == r_ll[i]);
        r_active[i] = in_r;
        if (ex) begin
          if (r_ec[i] == 32'hFFFFFFFF) n_wrap32++;
          r_ec[i]++;
        end
      end
      incf = (cm == TIME_A_RANGE) ? et : v;
      if (r_active[i] && incf) begin
        if (r_cc[i] == 48'hFFFFFFFFFFFF) n_wrap48++;
        r_cc[i]++;
      end
    end
  endtask

  // one bus cycle: values applied after the falling edge, then one clock
  task automatic run(input int n);
    for (int k = 0; k < n; k++) begin
      ref_step(a, valid, en_timer, chip_mode);
      @(negedge clk);
    end
  endtask

  initial begin
    logic [7:0] v;
    strb2 = 0; ren = 0; wen = 0; eccnt = 0; enr = 0; m = 0; c_in = 0;
    prg_chip = 0; limit = 0; strb = 0; valid = 0; a = 0; d = 0;
    en_timer = 1; chip_mode = TIME_A_RANGE;
    for (int i = 0; i < N; i++) begin
      r_active[i] = 0; r_cc[i] = 0; r_ec[i] = 0; r_ll[i] = '1; r_ul[i] = '0;
    end
    nr = 0;
    #1 nr = 1;
    @(negedge clk);
    repeat (3) @(negedge clk);
    nr = 0;
    repeat (20) @(negedge clk);

    // programming: no bus traffic is counted while valid is low, but in
    // time_a_range mode en_timer counts active recognizers, so the model
    // follows every cycle
    prg_chip = 1;
    for (int i = 0; i < N; i++) begin
      a = 32'h0FFFFFF2; d = 4'(i);         run(1);
      strb = 1;                            run(1);
      limit = 1; strb = 0;                 run(1);
      a = 32'h0FFFFFF8; strb = 1;          run(1);
      r_ll[i] = 32'h0FFFFFF2; r_ul[i] = 32'h0FFFFFF8;
      strb = 0; limit = 0;                 run(1);
    end

    // RAM test writes: all ones into every word of both RAMs
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < N; i++) begin
        m = 4'(i); eccnt = e[0];           run(2);
        strb2 = 1; wen = 1; a = 32'hFFFFFFFF; c_in = 8'hFF;
        run(1);
        if (e == 0) r_cc[i] = {40'hFF_FFFF_FFFF, r_cc[i][7:0]};
        else        r_ec[i] = {24'hFF_FFFF, r_ec[i][7:0]};
        strb2 = 0;
      end
      run(6);
    end
    strb = 0; strb2 = 0; wen = 0; eccnt = 0; c_in = 0; limit = 0; prg_chip = 0;
    run(1);

    // counting, time_a_range mode
    valid = 1; a = 32'h0FFFFFF9;           run(1);
    a = 32'hFFFFFFF4;                      run(1);
    valid = 0; a = 32'h0FFFFFFF;           run(1);
    en_timer = 0; a = 32'h0FFFFFF5;        run(1);
    valid = 1;                             run(1);
    en_timer = 1;                          run(1);
    a = 32'h0FFFFFFA;                      run(1);
    a = 32'h0FFFFFF6;                      run(300);
    a = 32'h0FFFFFFB;                      run(1);
    for (int k = 0; k < 300; k++) begin
      a = 32'h0FFFFFF7;                    run(1);
      a = 32'h0FFFFFFC;                    run(1);
    end
    foreach (tail[k]) begin
      a = tail[k];                         run(1);
    end
    valid = 0; en_timer = 0;
    run(200);

    // read-out
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < N; i++)
        for (int b = 0; b < (e ? 4 : 6); b++) begin
          ren = 1; eccnt = e[0]; m = 4'(i); enr = 3'(b);
          do @(negedge clk); while (clk4);
          do @(negedge clk); while (!clk4);
          do @(negedge clk); while (clk4);
          v = c_out;
          checks++;
          if (e == 0 && v !== r_cc[i][b*8 +: 8]) begin
            failures++;
            $display("FAIL rr %0d address/time byte %0d = %h expected %h", i, b, v, r_cc[i][b*8 +: 8]);
          end
          if (e == 1 && v !== r_ec[i][b*8 +: 8]) begin
            failures++;
            $display("FAIL rr %0d entry/exit byte %0d = %h expected %h", i, b, v, r_ec[i][b*8 +: 8]);
          end
        end
    ren = 0;
    checks++;
    if (n_wrap48 != N || n_wrap32 != N) begin
      failures++;
      $display("FAIL expected every count to wrap once: %0d / %0d", n_wrap48, n_wrap32);
    end
    $display("rr0 address/time count %h, entry/exit count %h", r_cc[0], r_ec[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // addresses on and around the limits at the end of the run
  localparam logic [31:0] tail [14] = '{
    32'h0FFFFFF8, 32'h0FFFFFF2, 32'h0FFFFFF8, 32'h0FFFFFFD, 32'h0FFFFFF2,
    32'h0FFFFFF0, 32'hFFFFFFFE, 32'hFFFFFFF4, 32'hFFFFFFFF, 32'h0FFFFFF0,
    32'hFFFFFFFA, 32'hFFFFFFFA, 32'hFFFFFFFA, 32'h0FFFFFF0 };
endmodule
