// tb_fp_sqrt_approx: self-checking testbench of the square-root approximation.
//
// Reference: split x = m * 2^(2k) with m in [0.5,2) by real arithmetic, then
// (1 - 0.5 y - 0.25 y^2) * 2^k with y = 1 - m. Also checks that the result
// stays within 15 % of the true square root over the whole reduced range,
// and that zero maps to zero. Tolerance against the reference 2^-19 relative.
module tb_fp_sqrt_approx;
  import tb_fp_pkg::*;
  logic clk = 0;
  logic [31:0] x, y;
  int checks = 0, failures = 0, cycles = 0;
  real xr, m, yy, want;
  int k;

  fp_sqrt_approx dut (.x(x), .y(y));

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
    if (xr <= 0.0) want = 0.0;
    else begin
      m = xr; k = 0;
      while (m >= 2.0) begin m = m / 4.0; k++; end
      while (m < 0.5)  begin m = m * 4.0; k--; end
      yy = 1.0 - m;
      want = (1.0 - 0.5 * yy - 0.25 * yy * yy) * (2.0 ** k);
    end
    checks++;
    if (!close(fp2r(y), want, 2.0 ** -19)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%g y=%g want %g", xr, fp2r(y), want);
    end
    if (xr > 0.0) begin
      checks++;
      if (!close(fp2r(y), $sqrt(xr), 0.15)) begin
        failures++;
        if (failures < 10) $display("FAIL far from sqrt: x=%g y=%g", xr, fp2r(y));
      end
    end
  endtask

  initial begin
    x = 0;
    check_one(32'h00000000);
    check_one(32'h3F800000);   // 1 -> 1
    check_one(32'h40800000);   // 4 -> 2
    check_one(32'h41100000);   // 9
    check_one(32'h3E800000);   // 0.25 -> 0.5
    repeat (5000) check_one(rand_fp(-30, 30, 1'b0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
