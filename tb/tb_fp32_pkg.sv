// tb_fp32_pkg: checks the FP32 add, subtract, multiply and divide functions
// against real arithmetic on random operands of mixed signs and magnitudes.
// Each result must match to a relative error of 2^-22.
module tb_fp32_pkg;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(input string op, input real got, input real want);
    checks++;
    if (!close(got, want, 2.5e-7, 1e-30)) begin
      failures++;
      $display("FAIL %s got %g want %g", op, got, want);
    end
  endtask

  initial begin
    real x, y, xr, yr;
    fp32_t a, b;
    for (int i = 0; i < 4000; i++) begin
      x = (real'($urandom_range(1, 1000000)) / 1000.0) * (2.0 ** ($signed($urandom_range(0, 20)) - 10));
      y = (real'($urandom_range(1, 1000000)) / 1000.0) * (2.0 ** ($signed($urandom_range(0, 20)) - 10));
      if ($urandom_range(0, 1) == 1) x = -x;
      if ($urandom_range(0, 1) == 1) y = -y;
      a = r2f(x); b = r2f(y);
      xr = f2r(a); yr = f2r(b);
      chk("mul", f2r(fp_mul(a, b)), xr * yr);
      chk("div", f2r(fp_div(a, b)), xr / yr);
      // sums lose relative accuracy under cancellation: scale tolerance by operand size
      checks++;
      if (!close(f2r(fp_add(a, b)), xr + yr, 0.0, 2.5e-7 * ((xr < 0 ? -xr : xr) + (yr < 0 ? -yr : yr)))) begin
        failures++; $display("FAIL add %g %g -> %g", xr, yr, f2r(fp_add(a, b)));
      end
      checks++;
      if (!close(f2r(fp_sub(a, b)), xr - yr, 0.0, 2.5e-7 * ((xr < 0 ? -xr : xr) + (yr < 0 ? -yr : yr)))) begin
        failures++; $display("FAIL sub %g %g", xr, yr);
      end
    end
    chk("add0", f2r(fp_add(FP_ZERO, r2f(3.5))), 3.5);
    chk("sub_self", f2r(fp_sub(r2f(3.5), r2f(3.5))), 0.0);
    chk("mul0", f2r(fp_mul(FP_ZERO, r2f(3.5))), 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
