// One range recognizer: programmable address range, pipelined range test,
// active bit and the low bytes of its two counts.
//
// Programming: while prg_lat (this recognizer selected, prg_chip high) and
// strb are high, the address bus a is written into the lower-limit register
// (limit low) or the upper-limit register (limit high) at the clock edge.
// The chip uses level-sensitive latches here; this design uses enabled
// flip-flops. The limits are not reset, as in the chip.
//
// Counting pipeline (one address per clock, every stage the chip's):
//   edge 0  the address is captured in the input register b (valid,
//           en_timer and chip_mode arrive already registered from the input
//           section at the same edge)
//   edge 1  4-bit group compares of b against both limits
//   edge 2  final  ll<b, ll==b, b<ul, b==ul
//   edge 3  the misc register takes
//             active    = valid & inrange | ~valid & active_prev
//             exitrange = valid & active_prev & (~inrange | b==ll)
//             inc       = chip_mode ? en_timer : valid
//           where inrange = ll <= b <= ul
//   edge 4  the address/time counter counts inc & active, the entry/exit
//           counter counts exitrange.
// So the active bit stays set while invalid addresses pass, is cleared by a
// valid address outside the range, and a valid address equal to the lower
// limit while active counts as a re-entry (recursion). The valid and
// en_timer flags are delayed two extra stages here to line up with the
// comparator result; the chip has its own flip-flops for this whose exact
// placement is this design's choice.
//
// Outputs: cc_cout / ec_cout pulse once every 256 counts of the
// address/time and entry/exit counters. rd_byte carries the low byte of the
// count chosen by eccnt while read_sel is high and is zero otherwise, so the
// bytes of all recognizers can be ORed onto one bus (the chip uses a shared
// tristate bus).
module range_recognizer
  import rtspa_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          bnr,        // master reset, active low
  input  logic [AW-1:0] a,          // address bus
  input  logic          prg_lat,    // this recognizer is being programmed
  input  logic          limit,      // 1: upper limit, 0: lower limit
  input  logic          strb,       // limit write strobe
  input  logic          valid_q,    // registered valid
  input  logic          en_timer_q, // registered en_timer
  input  chip_mode_e    chip_mode_q,// registered chip_mode
  input  logic          read_sel,   // this recognizer is being read out
  input  logic          eccnt,      // 1: entry/exit count, 0: address/time
  output logic          cc_cout,    // address/time low counter carry-out
  output logic          ec_cout,    // entry/exit low counter carry-out
  output logic [7:0]    cc_low,
  output logic [7:0]    ec_low,
  output logic [7:0]    rd_byte
);
  logic [AW-1:0] ll, ul, b;

  always_ff @(posedge clk) begin
    if (prg_lat && strb && !limit) ll <= a;
    if (prg_lat && strb &&  limit) ul <= a;
    b <= a;
  end

  // two comparators: lower limit against the address, address against the
  // upper limit
  logic aleb, aeqb, blec, beqc;
  gteq_cmp #(.WIDTH(AW)) u_cmp_ll (.clk, .a(ll), .b(b), .lt(aleb), .eq(aeqb));
  gteq_cmp #(.WIDTH(AW)) u_cmp_ul (.clk, .a(b), .b(ul), .lt(blec), .eq(beqc));

  // valid / en_timer delayed to the comparator's output stage
  logic valid_1, valid_2, en_timer_1, en_timer_2;
  always_ff @(posedge clk or negedge bnr) begin
    if (!bnr) begin
      valid_1    <= 1'b0;
      valid_2    <= 1'b0;
      en_timer_1 <= 1'b0;
      en_timer_2 <= 1'b0;
    end else begin
      valid_1    <= valid_q;
      valid_2    <= valid_1;
      en_timer_1 <= en_timer_q;
      en_timer_2 <= en_timer_1;
    end
  end

  logic inrange, active_d, exitrange_d, inc_d;
  logic active_3, exitrange_3, inc_3;

  always_comb begin
    inrange     = (aleb | aeqb) & (blec | beqc);
    active_d    = (valid_2 & inrange) | (~valid_2 & active_3);
    exitrange_d = valid_2 & active_3 & (~inrange | aeqb);
    inc_d       = (chip_mode_q == TIME_A_RANGE) ? en_timer_2 : valid_2;
  end

  // ffmisc
  always_ff @(posedge clk or negedge bnr) begin
    if (!bnr) begin
      active_3    <= 1'b0;
      exitrange_3 <= 1'b0;
      inc_3       <= 1'b0;
    end else begin
      active_3    <= active_d;
      exitrange_3 <= exitrange_d;
      inc_3       <= inc_d;
    end
  end

  counter8 u_cc (.clk, .bnr, .inc(inc_3 & active_3), .count(cc_low), .cout(cc_cout));
  counter8 u_ec (.clk, .bnr, .inc(exitrange_3),      .count(ec_low), .cout(ec_cout));

  assign rd_byte = read_sel ? (eccnt ? ec_low : cc_low) : 8'h00;
endmodule
