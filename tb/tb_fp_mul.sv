// tb_fp_mul: self-checking testbench of the single-precision multiplier.
//
// Applies directed and random operands and compares each result with the
// exact real-number result of the operation, computed from the operand bit
// patterns by tb_fp_pkg. The unit truncates, so a result may be up to one
// unit in the last place below the exact value: the tolerance is 2^-22
// relative. The unit is combinational; each vector is held for one clock.
module tb_fp_mul;
  import tb_fp_pkg::*;
  logic clk = 0;
  logic [31:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0, cycles = 0;
  real want;

  fp_mul dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check_one(logic [31:0] ta, logic [31:0] tb_, logic ts);
    a = ta; b = tb_; sub = ts;
    @(posedge clk);
    want = fp2r(a) * fp2r(b);
    checks++;
    if (!close(fp2r(y), want, 2.0 ** -22)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h sub=%0d y=%h (%g) want %g", a, b, sub, y, fp2r(y), want);
    end
  endtask

  initial begin
    a = 0; b = 0; sub = 0;
    check_one(32'h3F800000, 32'h3F800000, 1'b0);  // 1,1
    check_one(32'h40490FDB, 32'h402DF854, 1'b0);  // pi, e
    check_one(32'h40490FDB, 32'h402DF854, 1'b1);
    check_one(32'h3F800000, 32'h3F7FFFFF, 1'b1);  // cancellation
    check_one(32'h42C80000, 32'h3F000000, 1'b1);  // 100, 0.5
    check_one(32'hC1200000, 32'h40A00000, 1'b0);  // -10, 5
    repeat (20000) check_one(rand_fp(-20, 20, 1'b1), rand_fp(-20, 20, 1'b1), 1'($urandom));
    repeat (2000)  check_one(rand_fp(-3, 3, 1'b0), rand_fp(-3, 3, 1'b0), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
