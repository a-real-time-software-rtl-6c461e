// Self-checking test of gteq_cmp: random operand pairs (many made equal or
// differing in a single bit, to exercise the group equality chain) are fed
// one per clock; lt and eq must equal A<B and A==B of the pair fed two
// clock edges earlier.
//
// Timing: one operand pair per rising edge; results compared two edges
// later, the latency of the chip's two flip-flop stages.
module tb_gteq_cmp;
  logic clk = 0;
  logic [31:0] a, b;
  logic lt, eq;
  int checks = 0, failures = 0;
  logic [31:0] qa [$], qb [$];

  gteq_cmp #(.WIDTH(32)) dut (.clk, .a, .b, .lt, .eq);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (qa.size() == 2) begin
        logic [31:0] ea, eb;
        ea = qa.pop_front();
        eb = qb.pop_front();
        checks++;
        if (lt !== (ea < eb) || eq !== (ea == eb)) begin
          failures++;
          $display("FAIL a=%h b=%h lt=%0d eq=%0d", ea, eb, lt, eq);
        end
      end
      a = $urandom;
      case ($urandom_range(3))
        0: b = a;
        1: b = a ^ (32'h1 << $urandom_range(31));
        2: b = a + 32'($urandom_range(2)) - 32'd1;
        default: b = $urandom;
      endcase
      qa.push_back(a);
      qb.push_back(b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
