// Master reset synchronizer.
//
// The master reset pin nr passes through a chain of STAGES flip-flops, each
// feeding the next, so that the reset seen by the rest of the chip is
// aligned with the clock and cannot be metastable. The chain length of four
// is the chip's. The pin is asserted high, as in the chip's test vectors
// (nr is raised for three cycles, then held low while the chip works); the
// internal reset bnr is asserted low, as in the chip. Assertion is immediate
// (asynchronous) so the chip resets even without a clock; release happens
// STAGES clock edges after nr goes low - the asynchronous assertion is this
// design's choice.
//
// Interface: clk, nr (active high, asynchronous) -> bnr (active low,
// synchronous release). The last flip-flop of the chain is both shifted as
// data and used as the asynchronous reset of the rest of the chip; that is
// what a reset synchronizer is, so lint's note on it stands.
module reset_sync #(
  parameter int unsigned STAGES = 4
) (
  input  logic clk,
  input  logic nr,
  output logic bnr
);
  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or posedge nr) begin
    if (nr)  chain <= '0;
    else     chain <= {chain[STAGES-2:0], 1'b1};
  end

  assign bnr = chain[STAGES-1];
endmodule
