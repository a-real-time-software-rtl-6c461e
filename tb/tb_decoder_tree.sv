// Self-checking test of decoder_tree: all 32 combinations of enable and
// select are applied and the one-hot output is compared with 1 << sel
// (or zero when disabled).
//
// Timing: combinational, checked 1 ns after each input change. The
// expected one-hot code is the chip's decoding; the test order is ours.
module tb_decoder_tree;
  logic        en;
  logic [3:0]  sel;
  logic [15:0] onehot;
  int checks = 0, failures = 0;

  decoder_tree dut (.en, .sel, .onehot);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < 16; s++) begin
        en = e[0];
        sel = s[3:0];
        #1;
        checks++;
        if (onehot !== (e ? (16'h1 << s) : 16'h0)) begin
          failures++;
          $display("FAIL en=%0d sel=%0d onehot=%h", e, s, onehot);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
