// Priority resolver: queues the low counters' carry-outs for the single
// incrementer of a RAM circuit.
//
// Each recognizer's carry-out is a one-cycle pulse on the 10 ns clock. A
// hold flip-flop per recognizer (ffcout) keeps it:
//     pend <= cout | pend & ~rcc
// so a request stays pending until the resolver forwards it (rcc high),
// and a new carry is never lost because it is ORed in. On the falling edge
// of the 40 ns clock the pending requests are sampled (ffcc); the resolver
// passes on only the lowest-numbered one,
//     rcc_n = cc_n & ~cc_(n-1) & ... & ~cc_0,
// and that one-hot word is captured 20 ns later on the inverted 40 ns clock
// (rff). rcc addresses the RAM read port and clears the forwarded request.
// Recognizer 0 has the highest priority. All of this is the chip's; the two
// slow-clock edges are clock enables here (see clk_div4).
//
// With N requests the last is served after N slow cycles; since one
// recognizer can carry at most once per 256 fast cycles (64 slow cycles),
// 16 recognizers can never overrun it. bnr (active low) clears everything.
// The one-hot assertion on rcc is switched off during reset, so bnr is also
// read synchronously there; lint notes this and it is intended.
module priority_resolver #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         bnr,
  input  logic         clk4_fall,   // slow-clock edge enable
  input  logic         nclk4_fall,  // inverted slow-clock edge enable
  input  logic [N-1:0] cout,        // carry-outs of the low counters
  output logic [N-1:0] pend,        // held requests (cntcout.5)
  output logic [N-1:0] cc,          // requests sampled on the slow clock
  output logic [N-1:0] rcc          // forwarded request, one-hot or zero
);
  logic [N-1:0] pri;

  always_comb begin
    pri = '0;
    for (int i = N-1; i >= 0; i--)
      if (cc[i]) pri = N'(1) << i;
  end

  always_ff @(posedge clk or negedge bnr) begin
    if (!bnr) begin
      pend <= '0;
      cc   <= '0;
      rcc  <= '0;
    end else begin
      pend <= cout | (pend & ~rcc);
      if (clk4_fall)  cc  <= pend;
      if (nclk4_fall) rcc <= pri;
    end
  end

  // the forwarded request is always a single recognizer or none
  a_rcc_onehot: assert property (@(posedge clk) disable iff (!bnr) (rcc & (rcc - N'(1))) == '0);
endmodule
