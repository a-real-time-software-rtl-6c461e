// Output section: read/write enables for the two RAM circuits, read-out
// decoders and the byte multiplexer driving the c[7:0] pins.
//
//   ccenr  = ren & ~eccnt            read the address/time RAM
//   ecenr  = ren &  eccnt            read the entry/exit RAM
//   ccenw  = wen & prg_chip & ~eccnt test-write data select, address/time
//   ecenw  = wen & prg_chip &  eccnt                           entry/exit
//   ccenw2 = strb2 & prg_chip & ~eccnt  test-write address select
//   ecenw2 = strb2 & prg_chip &  eccnt
// These equations are the chip's gate list; note that the address select
// does not include wen (a test write raises wen and strb2 together).
// Zero for byte numbers 6 and 7 is this design's choice.
// m[3:0] is decoded into nn[15:0], which selects the recognizer whose low
// byte is read and addresses the RAMs for read-out and test writes (the
// chip has this separate decoder tree for timing reasons). enr[2:0] picks
// the byte: 0 is the recognizer's low counter, 1-3 come from the RAM chosen
// by eccnt, 4-5 from the address/time RAM (only the 48-bit count has them);
// 6 and 7 give zero. The bidirectional c pins are represented by c_out,
// c_oe (= ren) and c_in at the chip boundary. Purely combinational; the
// data is valid once the RAM's output register (ramff) has taken the
// addressed word at a clk4 falling edge.
module output_section (
  input  logic        ren,
  input  logic        wen,
  input  logic        eccnt,
  input  logic        prg_chip,
  input  logic        strb2,
  input  logic [2:0]  enr,        // byte number
  input  logic [3:0]  m,          // recognizer number for read-out
  input  logic [39:0] j,          // address/time RAM output
  input  logic [23:0] k,          // entry/exit RAM output
  input  logic [7:0]  rr_byte,    // low byte from the selected recognizer
  output logic        ccenr,
  output logic        ecenr,
  output logic        ccenw,
  output logic        ecenw,
  output logic        ccenw2,
  output logic        ecenw2,
  output logic [15:0] nn,
  output logic [5:0]  rd,
  output logic [7:0]  c_out,
  output logic        c_oe
);
  logic [23:0] l;

  assign ccenr  = ren & ~eccnt;
  assign ecenr  = ren &  eccnt;
  assign ccenw  = wen   & prg_chip & ~eccnt;
  assign ecenw  = wen   & prg_chip &  eccnt;
  assign ccenw2 = strb2 & prg_chip & ~eccnt;
  assign ecenw2 = strb2 & prg_chip &  eccnt;

  decoder_tree u_dec (.en(1'b1), .sel(m), .onehot(nn));

  always_comb begin
    rd = '0;
    if (enr < 3'd6) rd[enr] = 1'b1;
  end

  assign l = eccnt ? k : j[23:0];

  always_comb begin
    unique case (1'b1)
      rd[0]:   c_out = rr_byte;
      rd[1]:   c_out = l[7:0];
      rd[2]:   c_out = l[15:8];
      rd[3]:   c_out = l[23:16];
      rd[4]:   c_out = j[31:24];
      rd[5]:   c_out = j[39:32];
      default: c_out = 8'h00;
    endcase
  end

  assign c_oe = ren;
endmodule
