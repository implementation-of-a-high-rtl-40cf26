// tb_pkg: helpers shared by the testbenches -- conversion between binary32
// bit patterns and real numbers, and a tolerance compare. Reference values
// in the testbenches are computed in double precision (real) and compared
// with the design's single-precision results with a relative tolerance.
package tb_pkg;
  typedef logic [31:0] fp_t;

  // binary32 -> real, exact (subnormals read as zero)
  function automatic real f2r(input fp_t a);
    logic [63:0] d;
    if (a[30:23] == 8'd0) return 0.0;
    d = {a[31], 11'(int'(a[30:23]) + 896), a[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // real -> binary32, round to nearest even (tiny values flush to zero)
  function automatic fp_t r2f(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 896;
    if (d[62:0] == 63'd0 || e <= 0) return {d[63], 31'd0};
    m = {2'b01, d[51:29]};
    if (d[28] && ((|d[27:0]) || d[29])) m = m + 25'd1;
    if (m[24]) begin
      e = e + 1;
      m = m >> 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // |got - exp| <= rel*|exp| + abs_tol
  function automatic bit close(input real got, input real exp, input real rel, input real abs_tol);
    return rabs(got - exp) <= rel * rabs(exp) + abs_tol;
  endfunction

  // uniform real in [lo, hi)
  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom % 1000000) / 1000000.0);
  endfunction
endpackage
