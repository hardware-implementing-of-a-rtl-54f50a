// tb_lfsr_rng: self-checking testbench of the LFSR random number generator.
//
// Checks the reset value (the seed), then steps the generator and compares
// every state with a reference built on the output bit stream: for the
// polynomial x^32 + x^22 + x^2 + x + 1 the stream obeys
// s[n+32] = s[n] ^ s[n+10] ^ s[n+30] ^ s[n+31], and the register holds the
// last 32 bits of it. Also checks that a low enable holds the state and that
// a zero seed does not lock the register at zero.
module tb_lfsr_rng;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] rnd, rnd0;
  int checks = 0, failures = 0, cycles = 0;
  bit hist [$];   // all bits ever shifted out of / held by the register, oldest first
  logic [31:0] want;

  lfsr_rng dut  (.clk(clk), .rst_n(rst_n), .seed(32'hACE1_2345), .en(en), .rnd(rnd));
  lfsr_rng dut0 (.clk(clk), .rst_n(rst_n), .seed(32'h0), .en(en), .rnd(rnd0));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s rnd=%h want=%h", what, rnd, want);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    want = 32'hACE1_2345;
    chk(rnd == want, "seed");
    chk(rnd0 == 32'd1, "zero seed replaced");
    for (int i = 31; i >= 0; i--) hist.push_back(want[i]);   // hist[n] is bit 31-n of the seed
    en = 1;
    for (int step = 0; step < 3000; step++) begin
      @(negedge clk);
      // the sequence s[n] obeys s[n+32] = s[n] ^ s[n+10] ^ s[n+30] ^ s[n+31]
      begin
        int n;
        n = hist.size() - 32;
        hist.push_back(hist[n] ^ hist[n + 10] ^ hist[n + 30] ^ hist[n + 31]);
      end
      for (int i = 0; i < 32; i++) want[31 - i] = hist[hist.size() - 32 + i];
      chk(rnd == want, "sequence");
    end
    en = 0;
    @(negedge clk);
    chk(rnd == want, "hold when disabled");
    chk(rnd0 != 32'd0, "no lock-up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
