// RAM circuit: upper bits of one kind of count for all recognizers, with one
// shared incrementer.
//
// A W-bit, N-word RAM holds bits [W+7:8] of each recognizer's count (W = 40
// for the 48-bit address/time count, 24 for the 32-bit entry/exit count).
// Everything runs on the 40 ns clock, given here as clock enables of the
// 10 ns clock (see clk_div4). One increment takes two slow cycles and a new
// one starts every slow cycle:
//   nclk4 edge   the priority resolver puts one-hot rcc on the read port
//   clk4 edge    ramff <= RAM[read port];  ffcin <= |rcc (0 while reading out)
//   clk4d edge   wff <= rcc  (write-port address, one fast cycle after clk4)
//   next clk4    incff <= ramff + ffcin
// The write port is enabled all the time: on every fast clock the word
// addressed by wff is written with incff. The last write before wff moves on
// is therefore the incremented value of exactly the word that was read -
// this is the chip's own timing trick and is kept as is.
//
// Read-out (enr high): the read port is addressed by the decoded m pins
// (rsel) instead of rcc, and the carry-in is forced to zero; the addressed
// word appears on dout after the next clk4 edge.
// RAM test write (enw high): the data port takes wr instead of incff; with
// enw2 also high the write port is addressed by rsel instead of wff.
//
// Reset: bnr clears the flip-flops and the RAM words. The chip starts
// counting from a zeroed RAM; doing that with the reset (its RAM cells have
// no reset input) is this design's choice.
//
// Follows the chip: the read/write multiplexers, the register chain and its
// timing. This design's choices: clock enables on one clock instead of
// separate slow clocks, clk4d one fast cycle after clk4 (about 8 ns in the
// chip), rising-edge flip-flops.
module ram_circuit #(
  parameter int unsigned W = 40,
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         bnr,
  input  logic         clk4_fall,
  input  logic         clk4d_fall,
  input  logic [N-1:0] rcc,    // request from the priority resolver
  input  logic         enr,    // read-out of this RAM
  input  logic         enw,    // test data select
  input  logic         enw2,   // test address select
  input  logic [N-1:0] rsel,   // decoded m pins
  input  logic [W-1:0] wr,     // test data
  output logic [W-1:0] dout,   // ramff
  output logic [W-1:0] nh      // incff
);
  logic [W-1:0] mem [N];
  logic [N-1:0] rd, wd, p;
  logic [W-1:0] rdata, din;
  logic         cin;

  assign rd  = enr  ? rsel : rcc;
  assign wd  = enw2 ? rsel : p;
  assign din = enw  ? wr   : nh;

  // one-hot read port: the selected word, zero if none is selected
  always_comb begin
    rdata = '0;
    for (int i = 0; i < N; i++)
      if (rd[i]) rdata = rdata | mem[i];
  end

  always_ff @(posedge clk or negedge bnr) begin
    if (!bnr) begin
      dout <= '0;
      nh   <= '0;
      cin  <= 1'b0;
      p    <= '0;
    end else begin
      if (clk4_fall) begin
        dout <= rdata;
        cin  <= enr ? 1'b0 : |rcc;
        nh   <= dout + W'(cin);
      end
      if (clk4d_fall) p <= rcc;
    end
  end

  always_ff @(posedge clk or negedge bnr) begin
    if (!bnr) begin
      for (int i = 0; i < N; i++) mem[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++)
        if (wd[i]) mem[i] <= din;
    end
  end
endmodule
