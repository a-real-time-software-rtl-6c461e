// 4-to-16 decoder tree with enable.
//
// Selects one of the 16 range recognizers (or RAM words) from a 4-bit
// number. As in the chip, it is a two-level tree of enabled 2-to-4
// decoders: the upper two bits drive one decoder, whose four outputs enable
// four decoders driven by the lower two bits. All outputs are low when en is
// low. Interface: en, sel[3:0] -> onehot[15:0]; purely combinational, no
// clock. The tree structure is the chip's; writing each level as an indexed
// assignment rather than gates is this design's.
module decoder_tree (
  input  logic        en,
  input  logic [3:0]  sel,
  output logic [15:0] onehot
);
  logic [3:0] upper;

  always_comb begin
    upper = '0;
    if (en) upper[sel[3:2]] = 1'b1;
  end

  always_comb begin
    onehot = '0;
    for (int g = 0; g < 4; g++)
      if (upper[g]) onehot[g*4 + int'(sel[1:0])] = 1'b1;
  end
endmodule
