// tb_fp_exp_neg: self-checking testbench of the exp(-x) approximation.
//
// For x in [0,1) the expected value is 1 - x + 0.5 x^2 evaluated in real
// arithmetic; for x >= 1 it is 0. Directed points plus random arguments.
// Tolerance 2^-20 relative (four truncating operations in the unit).
module tb_fp_exp_neg;
  import tb_fp_pkg::*;
  logic clk = 0;
  logic [31:0] x, y;
  int checks = 0, failures = 0, cycles = 0;
  real xr, want;

  fp_exp_neg dut (.x(x), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check_one(logic [31:0] tx);
    x = tx;
    @(posedge clk);
    xr = fp2r(x);
    want = (xr >= 1.0) ? 0.0 : 1.0 - xr + 0.5 * xr * xr;
    checks++;
    if (!close(fp2r(y), want, 2.0 ** -20)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%g y=%g want %g", xr, fp2r(y), want);
    end
  endtask

  initial begin
    x = 0;
    check_one(32'h00000000);   // exp(-0) = 1
    check_one(32'h3F000000);   // 0.5 -> 0.625
    check_one(32'h3E800000);   // 0.25
    check_one(32'h3F800000);   // 1.0 -> clamped 0
    check_one(32'h41200000);   // 10 -> 0
    repeat (5000) check_one(rand_fp(-12, -1, 1'b0));
    repeat (500)  check_one(rand_fp(0, 6, 1'b0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
