// Divide-by-four timing generator for the RAM circuit.
//
// The chip runs its range recognizers on the 10 ns input clock and its RAM
// circuits on a 40 ns clock made by dividing the input clock by four (two
// toggle flip-flops in the original). This design keeps a single clock and a
// 2-bit phase counter instead, and gives the RAM circuits clock enables that
// mark where the original's slow-clock edges fall:
//   clk4_fall - the falling edge of clk4 (the RAM circuit's main edge);
//   nclk4_fall - 20 ns later, the edge of the inverted clock nclk4;
//   clk4d_fall - the delayed clock clk4d, modelled one 10 ns cycle after
//                clk4_fall (the original delays clk4 by about 8 ns).
// Each enable is high for the one clk cycle whose closing edge is that event.
// clk4 itself (high in phases 2 and 3, falling when phase 3 ends) is driven to
// a pin so that external logic can synchronize its read requests.
// Reset (bnr, active low) puts the phase at 0.
module clk_div4 (
  input  logic clk,
  input  logic bnr,
  output logic clk4,
  output logic clk4_fall,
  output logic nclk4_fall,
  output logic clk4d_fall
);
  logic [1:0] phase;

  always_ff @(posedge clk or negedge bnr) begin
    if (!bnr) phase <= 2'd0;
    else      phase <= phase + 2'd1;
  end

  assign clk4       = phase[1];
  assign clk4_fall  = (phase == 2'd3);
  assign nclk4_fall = (phase == 2'd1);
  assign clk4d_fall = (phase == 2'd0);
endmodule
