// tb_fp32: self-checking test of the binary32 operators in mpc_pkg. Random
// operands over a wide exponent range are applied to add, sub, mul, div and
// sqrt; each result must lie within one unit in the last place of the value
// computed in double precision and rounded to single precision. Compare and
// integer conversion are checked as well.
module tb_fp32;
  import mpc_pkg::*;
  import tb_pkg::r2f;
  import tb_pkg::f2r;

  int checks = 0, failures = 0;

  function automatic bit ulp_ok(input logic [31:0] got, input logic [31:0] exp);
    int d;
    if (got == exp) return 1;
    if (got[31] != exp[31]) return 0;
    d = int'(got[30:0]) - int'(exp[30:0]);
    return d <= 1 && d >= -1;
  endfunction

  function automatic logic [31:0] rnd_fp(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + ($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (!ulp_ok(got, exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] a, b;
    real ra, rb;
    for (int t = 0; t < 4000; t++) begin
      a = rnd_fp(100, 154);
      b = (t % 5 == 0) ? {~a[31], a[30:23], 23'($urandom)} : rnd_fp(100, 154);
      ra = f2r(a);
      rb = f2r(b);
      chk("add", fp_add(a, b), r2f(ra + rb));
      chk("sub", fp_sub(a, b), r2f(ra - rb));
      chk("mul", fp_mul(a, b), r2f(ra * rb));
      chk("div", fp_div(a, b), r2f(ra / rb));
      chk("sqrt", fp_sqrt(fp_abs(a)), r2f($sqrt(f2r(fp_abs(a)))));
      checks++;
      if (fp_lt(a, b) != (ra < rb)) failures++;
    end
    chk("exact cancel", fp_add(32'h3fc00000, 32'hbfc00000), 32'h0);
    chk("one plus one", fp_add(FP_ONE, FP_ONE), 32'h40000000);
    chk("sqrt4", fp_sqrt(32'h40800000), 32'h40000000);
    chk("int50", fp_from_int(50), r2f(50.0));
    chk("div0", fp_div(FP_ONE, FP_ZERO), 32'h7f800000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
