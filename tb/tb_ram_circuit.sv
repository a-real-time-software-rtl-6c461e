// Self-checking test of ram_circuit (40-bit words, 16 words) with the
// slow-clock enables of clk_div4. The test plays the part of the priority
// resolver: on every nclk4 edge it presents a one-hot request (or none).
// A reference array counts the expected words.
//   1. after reset every word reads zero;
//   2. test writes (enw + enw2) load every word, one of them with all ones;
//   3. a random request stream (never the same word in two consecutive slow
//      cycles, as the resolver guarantees) increments the words; each
//      incremented word must be in the RAM eight clocks after its request
//      appeared (read, increment, write back in two slow cycles); the
//      all-ones word must wrap to zero;
//   4. every word is read out (enr) and compared.
//
// Timing: the request is applied on the falling edge in the cycle whose
// rising edge is the nclk4 event. The read/increment/write sequence is the
// chip's; the eight-clock bound and the RAM reset are this design's.
module tb_ram_circuit;
  localparam int N = 16;
  localparam int W = 40;
  logic clk = 0, bnr;
  logic clk4, clk4_fall, nclk4_fall, clk4d_fall;
  logic [N-1:0] rcc, rsel;
  logic enr, enw, enw2;
  logic [W-1:0] wr, dout, nh;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_mem [N];

  clk_div4 u_div (.clk, .bnr, .clk4, .clk4_fall, .nclk4_fall, .clk4d_fall);
  ram_circuit #(.W(W), .N(N)) dut (.clk, .bnr, .clk4_fall, .clk4d_fall, .rcc,
                                   .enr, .enw, .enw2, .rsel, .wr, .dout, .nh);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait until just after the next edge that is a clk4 falling edge
  task automatic after_clk4_fall();
    do @(negedge clk); while (!clk4_fall);
    @(negedge clk);
  endtask

  task automatic read_word(input int i, output logic [W-1:0] v);
    rsel = N'(1) << i;
    enr = 1;
    after_clk4_fall();
    after_clk4_fall();
    v = dout;
    enr = 0;
    rsel = '0;
  endtask

  // checks pending for "word i must hold ref value at clock t"
  int   pend_t [$];
  int   pend_i [$];
  logic [W-1:0] pend_v [$];
  int   edges = 0;
  always @(posedge clk) edges++;

  always @(negedge clk) begin
    while (pend_t.size() > 0 && pend_t[0] <= edges) begin
      int t, i;
      logic [W-1:0] v;
      t = pend_t.pop_front();
      i = pend_i.pop_front();
      v = pend_v.pop_front();
      checks++;
      if (dut.mem[i] !== v) begin
        failures++;
        $display("FAIL word %0d = %h at edge %0d, expected %h", i, dut.mem[i], edges, v);
      end
    end
  end

  initial begin
    logic [W-1:0] v;
    int last;
    bnr = 0; rcc = '0; rsel = '0; enr = 0; enw = 0; enw2 = 0; wr = '0;
    repeat (3) @(negedge clk);
    bnr = 1;
    for (int i = 0; i < N; i++) ref_mem[i] = '0;

    // 1. reset state
    for (int i = 0; i < N; i++) begin
      read_word(i, v);
      checks++;
      if (v !== '0) begin failures++; $display("FAIL word %0d not zero after reset", i); end
    end

    // 2. test writes
    for (int i = 0; i < N; i++) begin
      ref_mem[i] = (i == 5) ? '1 : {8'($urandom), 32'($urandom)};
      rsel = N'(1) << i;
      wr = ref_mem[i];
      enw = 1;
      @(negedge clk) enw2 = 1;
      repeat (2) @(negedge clk);
      enw2 = 0;
      @(negedge clk) enw = 0;
    end
    rsel = '0;

    // 3. request stream
    last = -1;
    for (int n = 0; n < 600; n++) begin
      int i;
      do @(negedge clk); while (!nclk4_fall);
      @(negedge clk);   // just after the nclk4 edge
      if (n % 50 < 16) i = n % 50;              // worst case: all words in a row
      else if ($urandom_range(3) == 0) i = -1;  // idle slow cycle
      else i = $urandom_range(N-1);
      if (i == last) i = -1;
      if (i >= 0) begin
        rcc = N'(1) << i;
        ref_mem[i] = ref_mem[i] + 1;
        pend_t.push_back(edges + 8);
        pend_i.push_back(i);
        pend_v.push_back(ref_mem[i]);
      end else rcc = '0;
      last = i;
    end
    do @(negedge clk); while (!nclk4_fall);
    @(negedge clk) rcc = '0;
    repeat (16) @(negedge clk);

    // 4. read-out
    for (int i = 0; i < N; i++) begin
      read_word(i, v);
      checks++;
      if (v !== ref_mem[i]) begin
        failures++;
        $display("FAIL read word %0d = %h expected %h", i, v, ref_mem[i]);
      end
    end
    checks++;
    if (ref_mem[5] > 40'd100) begin failures++; $display("FAIL word 5 did not wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
