// Real-time software performance analysis chip (top level).
//
// The chip watches the address bus of a processor and, for each of NUM_RR
// programmable address ranges, keeps
//   * a 48-bit address/time count: in count_addr mode (chip_mode low) the
//     number of valid addresses that fell inside the range; in time_a_range
//     mode (chip_mode high) the number of clock cycles with en_timer high
//     while the range was active (entered and not yet left);
//   * a 32-bit entry/exit count: how often the range was left, plus re-entries
//     at its lower limit while active (recursion).
// Every recognizer has only the low byte of each count in fast counters.
// Their carry-outs, at most one per 256 clocks each, are queued by a
// priority resolver and added to the upper bits, kept in a 16-word RAM, by a
// single incrementer working at a quarter of the clock rate. There is one
// priority resolver + RAM circuit for each of the two counts.
//
// Pins and protocol (all synchronous to clk, nominally 100 MHz):
//   nr            master reset, active high (as in the chip's test vectors)
//   a, valid      the bus address and whether it should be looked at
//   en_timer, chip_mode   see above
//   prg_chip, d, limit, strb   programming: with prg_chip high, d selecting
//                 a recognizer and limit choosing lower (0) / upper (1),
//                 the address bus is written into the limit while strb is high
//   ren, eccnt, m, enr   read-out: with ren high, m selecting a recognizer
//                 and eccnt choosing the entry/exit (1) or address/time (0)
//                 count, c_out carries byte enr (0 = least significant) of it
//                 once a falling edge of clk4 has passed; c_oe = ren
//   wen, strb2, c_in  RAM test write: with prg_chip and wen high the RAM
//                 selected by eccnt takes {c_in, a} (40 bits) or a[23:0]
//                 (24 bits) as data, and with strb2 also high it is written
//                 into word m
//   clk4          the internal divide-by-4 clock, for synchronizing read-out
// Counting latency: an address at the pins is reflected in the low counters
// five clock edges later. Pads, level shifters and clock buffers of the chip
// are not modelled; the bidirectional c pins appear as c_in/c_out/c_oe.
// Some internal nets (the hold flip-flops and sampled requests of both
// resolvers, the incremented RAM words, the decoded byte select) have no
// load at this level; they are kept as named signals because they are the
// points to watch when following a carry through the chip. The choices
// common to all blocks: one clock with enables in place of the divided
// clocks, rising-edge flip-flops (the chip's are falling-edge),
// edge-triggered limit registers in place of latches, an AND-OR read bus in
// place of tristate buffers.
module rtspa_chip
  import rtspa_pkg::*;
#(
  parameter int unsigned N_RR = NUM_RR
) (
  input  logic               clk,
  input  logic               nr,
  input  logic [ADDR_W-1:0]  a,
  input  logic               valid,
  input  logic               en_timer,
  input  chip_mode_e         chip_mode,
  input  logic               prg_chip,
  input  logic               limit,
  input  logic               strb,
  input  logic [3:0]         d,
  input  logic               ren,
  input  logic               wen,
  input  logic               eccnt,
  input  logic               strb2,
  input  logic [2:0]         enr,
  input  logic [3:0]         m,
  input  logic [7:0]         c_in,
  output logic [7:0]         c_out,
  output logic               c_oe,
  output logic               clk4
);
  // ---------------- input section ----------------
  logic        bnr, valid_q, en_timer_q;
  chip_mode_e  chip_mode_q;
  logic [15:0] prg_lat;

  input_section u_in (
    .clk, .nr, .valid, .en_timer, .chip_mode, .prg_chip, .d,
    .bnr, .valid_q, .en_timer_q, .chip_mode_q, .prg_lat
  );

  // ---------------- slow clock ----------------
  logic clk4_fall, nclk4_fall, clk4d_fall;
  clk_div4 u_div (.clk, .bnr, .clk4, .clk4_fall, .nclk4_fall, .clk4d_fall);

  // ---------------- output section (enables and decoders) ----------------
  logic        ccenr, ecenr, ccenw, ecenw, ccenw2, ecenw2;
  logic [15:0] nn;
  logic [5:0]  rd;
  logic [CC_HI_W-1:0] j;
  logic [EC_HI_W-1:0] k;
  logic [7:0]  rr_bus;

  output_section u_out (
    .ren, .wen, .eccnt, .prg_chip, .strb2, .enr, .m,
    .j, .k, .rr_byte(rr_bus),
    .ccenr, .ecenr, .ccenw, .ecenw, .ccenw2, .ecenw2,
    .nn, .rd, .c_out, .c_oe
  );

  // ---------------- range recognizers ----------------
  logic [N_RR-1:0] cc_cout, ec_cout;
  logic [7:0]      rr_byte [N_RR];

  for (genvar i = 0; i < N_RR; i++) begin : g_rr
    logic [7:0] cc_low, ec_low;
    range_recognizer u_rr (
      .clk, .bnr, .a,
      .prg_lat(prg_lat[i]), .limit, .strb,
      .valid_q, .en_timer_q, .chip_mode_q,
      .read_sel(nn[i]), .eccnt,
      .cc_cout(cc_cout[i]), .ec_cout(ec_cout[i]),
      .cc_low, .ec_low, .rd_byte(rr_byte[i])
    );
  end

  // shared read-out bus (a tristate bus in the chip)
  always_comb begin
    rr_bus = '0;
    for (int i = 0; i < N_RR; i++) rr_bus = rr_bus | rr_byte[i];
  end

  // ---------------- priority resolvers and RAM circuits ----------------
  logic [N_RR-1:0] cc_pend, cc_cc, rcc;
  logic [N_RR-1:0] ec_pend, ec_cc, rec;
  logic [CC_HI_W-1:0] cc_nh;
  logic [EC_HI_W-1:0] ec_nh;

  priority_resolver #(.N(N_RR)) u_pri_cc (
    .clk, .bnr, .clk4_fall, .nclk4_fall,
    .cout(cc_cout), .pend(cc_pend), .cc(cc_cc), .rcc(rcc)
  );
  priority_resolver #(.N(N_RR)) u_pri_ec (
    .clk, .bnr, .clk4_fall, .nclk4_fall,
    .cout(ec_cout), .pend(ec_pend), .cc(ec_cc), .rcc(rec)
  );

  ram_circuit #(.W(CC_HI_W), .N(N_RR)) u_ram_cc (
    .clk, .bnr, .clk4_fall, .clk4d_fall,
    .rcc(rcc), .enr(ccenr), .enw(ccenw), .enw2(ccenw2),
    .rsel(nn[N_RR-1:0]), .wr({c_in, a}), .dout(j), .nh(cc_nh)
  );
  ram_circuit #(.W(EC_HI_W), .N(N_RR)) u_ram_ec (
    .clk, .bnr, .clk4_fall, .clk4d_fall,
    .rcc(rec), .enr(ecenr), .enw(ecenw), .enw2(ecenw2),
    .rsel(nn[N_RR-1:0]), .wr(a[EC_HI_W-1:0]), .dout(k), .nh(ec_nh)
  );
endmodule
