// Low-order count byte of one range recognizer.
//
// An 8-bit counter built as two 4-bit halves so that only a 4-bit increment
// has to fit in one 10 ns cycle. When inc is high the low nibble increments;
// its carry-out is captured in a flip-flop and increments the high nibble on
// the next cycle. cout pulses for one cycle when the high nibble wraps from
// F to 0, i.e. once per 256 increments, one cycle after the low nibble
// wrapped; it asks the RAM circuit to add one to the upper count bits.
// The structure (two nibble incrementers, registered inter-nibble carry) is
// the chip's; cout being the combinational carry of the high incrementer
// follows the library incrementer cell it used. bnr (active low,
// asynchronous) clears the count and the carry.
module counter8 (
  input  logic       clk,
  input  logic       bnr,
  input  logic       inc,
  output logic [7:0] count,
  output logic       cout
);
  logic [3:0] lo, hi;
  logic       c4;     // registered carry out of the low nibble

  always_ff @(posedge clk or negedge bnr) begin
    if (!bnr) begin
      lo <= '0;
      hi <= '0;
      c4 <= 1'b0;
    end else begin
      if (inc) lo <= lo + 4'd1;
      c4 <= inc & (lo == 4'hF);
      if (c4) hi <= hi + 4'd1;
    end
  end

  assign cout  = c4 & (hi == 4'hF);
  assign count = {hi, lo};
endmodule
