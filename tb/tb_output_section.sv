// Self-checking test of output_section: random pin combinations; the
// enables, the m decoder, the byte decoder and the selected output byte are
// compared with values computed from the pin description:
// byte 0 = recognizer byte, bytes 1-3 = bits 7:0, 15:8, 23:16 of the RAM
// chosen by eccnt, bytes 4-5 = bits 31:24, 39:32 of the address/time RAM.
//
// Timing: combinational, checked 1 ns after each change. The enable
// equations and the byte order are the chip's; zero for bytes 6 and 7 is
// this design's choice.
module tb_output_section;
  logic ren, wen, eccnt, prg_chip, strb2;
  logic [2:0] enr;
  logic [3:0] m;
  logic [39:0] j;
  logic [23:0] k;
  logic [7:0] rr_byte, c_out;
  logic ccenr, ecenr, ccenw, ecenw, ccenw2, ecenw2, c_oe;
  logic [15:0] nn;
  logic [5:0] rd;
  int checks = 0, failures = 0;

  output_section dut (.ren, .wen, .eccnt, .prg_chip, .strb2, .enr, .m, .j, .k,
    .rr_byte, .ccenr, .ecenr, .ccenw, .ecenw, .ccenw2, .ecenw2, .nn, .rd,
    .c_out, .c_oe);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [47:0] cc_full;
      logic [31:0] ec_full;
      logic [7:0] exp_byte;
      {ren, wen, eccnt, prg_chip, strb2} = 5'($urandom);
      enr = 3'($urandom);
      m = 4'($urandom);
      j = {8'($urandom), 32'($urandom)};
      k = 24'($urandom);
      rr_byte = 8'($urandom);
      #1;
      cc_full = {j, rr_byte};
      ec_full = {k, rr_byte};
      if (enr > 5) exp_byte = 8'h00;
      else if (eccnt && enr < 4) exp_byte = ec_full[enr*8 +: 8];
      else exp_byte = cc_full[enr*8 +: 8];
      checks++;
      if (c_out !== exp_byte || c_oe !== ren) begin
        failures++;
        $display("FAIL enr=%0d eccnt=%0d c_out=%h expected %h", enr, eccnt, c_out, exp_byte);
      end
      checks++;
      if ({ccenr, ecenr, ccenw, ecenw, ccenw2, ecenw2} !==
          {ren & !eccnt, ren & eccnt, wen & prg_chip & !eccnt, wen & prg_chip & eccnt,
           strb2 & prg_chip & !eccnt, strb2 & prg_chip & eccnt}) begin
        failures++;
        $display("FAIL enables ren=%0d wen=%0d eccnt=%0d prg=%0d strb2=%0d", ren, wen, eccnt,
                 prg_chip, strb2);
      end
      checks++;
      if (nn !== (16'h1 << m) || rd !== (enr < 6 ? (6'h1 << enr) : 6'h0)) begin
        failures++;
        $display("FAIL decoders m=%0d enr=%0d", m, enr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
