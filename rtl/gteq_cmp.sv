// Two-stage pipelined 32-bit magnitude comparator (gengteq + gteq).
//
// Computes lt = (A < B) and eq = (A == B) for unsigned A and B, for one new
// pair every clock. Per bit, e = (a == b) and g = (~a & b) ("b greater").
// A 4-bit group compare is then
//     lt4 = g3 | e3 g2 | e3 e2 g1 | e3 e2 e1 g0,   eq4 = e3 e2 e1 e0,
// and the same formula applied to the (lt4, eq4) pairs of four groups gives
// the 16-bit result, and once more for two halves the 32-bit result.
// Stage 1 registers the eight group results; stage 2 registers the final
// lt/eq. So lt/eq belong to the operands presented two clock edges earlier.
// This split (group results in the first flip-flop stage, the rest in the
// second) is the chip's. The registers carry no reset: they hold only
// pipeline values that are overwritten every cycle.
module gteq_cmp #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             lt,
  output logic             eq
);
  localparam int unsigned GROUPS = WIDTH / 4;

  // fold a list of (less, equal) pairs, most significant first
  function automatic logic [1:0] fold4(input logic [3:0] g, input logic [3:0] e);
    logic less, same;
    less = g[3] | (e[3] & g[2]) | (e[3] & e[2] & g[1]) | (e[3] & e[2] & e[1] & g[0]);
    same = &e;
    return {less, same};
  endfunction

  logic [GROUPS-1:0] g1_lt, g1_eq;    // stage-1 flip-flops

  always_ff @(posedge clk) begin
    for (int k = 0; k < GROUPS; k++) begin
      logic [3:0] e, g;
      logic [1:0] r;
      e = ~(a[k*4 +: 4] ^ b[k*4 +: 4]);
      g = ~a[k*4 +: 4] & b[k*4 +: 4];
      r = fold4(g, e);
      g1_lt[k] <= r[1];
      g1_eq[k] <= r[0];
    end
  end

  // second level: groups of four group results, then combine the upper and
  // lower halves: lt = lt_hi | eq_hi & lt_lo (aleb32 + aeqb32 * aleb16)
  localparam int unsigned SUPER = (GROUPS + 3) / 4;
  logic [SUPER-1:0] s_lt, s_eq;
  logic             lt_d, eq_d;

  always_comb begin
    for (int s = 0; s < SUPER; s++) begin
      logic [3:0] gg, ee;
      logic [1:0] r;
      gg = '0;
      ee = '1;
      for (int j = 0; j < 4; j++)
        if (s*4 + j < GROUPS) begin
          gg[j] = g1_lt[s*4 + j];
          ee[j] = g1_eq[s*4 + j];
        end
      r = fold4(gg, ee);
      s_lt[s] = r[1];
      s_eq[s] = r[0];
    end
    lt_d = 1'b0;
    eq_d = 1'b1;
    for (int s = 0; s < SUPER; s++) begin
      lt_d = s_lt[s] | (s_eq[s] & lt_d);
      eq_d = s_eq[s] & eq_d;
    end
  end

  always_ff @(posedge clk) begin
    lt <= lt_d;
    eq <= eq_d;
  end
endmodule
