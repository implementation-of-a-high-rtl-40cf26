// mpc_pkg: types, constants and arithmetic shared by the MPC QP accelerator.
//
// All solver data is IEEE-754 single precision (binary32), which is the
// number format the accelerator is built around. The arithmetic is provided
// as synthesizable functions so that every datapath in the design uses the
// same operators:
//   fp_add / fp_sub / fp_mul / fp_div / fp_sqrt  -- round to nearest even
//   fp_neg / fp_abs / fp_lt / fp_is_neg / fp_from_int
// Simplifications chosen for this design: subnormal inputs are read as zero
// and subnormal results are flushed to (signed) zero; overflow gives
// infinity; NaN payloads are not preserved (sqrt of a negative number gives
// the quiet NaN 7fc00000). Each function is one combinational operator; the
// modules that call them register the result every cycle.
//
// The second half holds the index arithmetic of the sparse MPC formulation:
// the optimisation vector xi = [u0 x1 u1 x2 ... u(N-1) xN], the multiplier
// vector lambda = [lambda0 ... lambda(N-1)], the inequality vector with, per
// stage, [u upper, u lower, x upper, x lower] bounds, and the reordered
// primal-dual vector [u0 lambda0 x1 u1 lambda1 x2 ...] used by the banded
// KKT system.
package mpc_pkg;

  typedef logic [31:0] fp_t;

  localparam fp_t FP_ZERO = 32'h0000_0000;
  localparam fp_t FP_ONE  = 32'h3f80_0000;
  localparam fp_t FP_NAN  = 32'h7fc0_0000;

  // Normalise and round: value = m * 2^(e - 127 - 63), i.e. a set bit 63 of
  // m has biased exponent e. Bit 0 of m may carry a sticky flag.
  function automatic fp_t fp_pack(input logic s, input int e, input logic [63:0] m);
    int lz;
    logic found;
    logic [63:0] mn;
    logic [24:0] r;
    logic guard, sticky;
    int en;
    if (m == 64'd0) return FP_ZERO;
    lz = 0;
    found = 1'b0;
    for (int i = 63; i >= 0; i--) begin
      if (!found && m[i]) begin
        lz = 63 - i;
        found = 1'b1;
      end
    end
    mn = m << lz;
    en = e - lz;
    r = {1'b0, mn[63:40]};
    guard = mn[39];
    sticky = |mn[38:0];
    if (guard && (sticky || mn[40])) r = r + 25'd1;
    if (r[24]) begin
      en = en + 1;
      r = r >> 1;
    end
    if (en >= 255) return {s, 8'hff, 23'd0};
    if (en <= 0) return {s, 31'd0};
    return {s, en[7:0], r[22:0]};
  endfunction

  function automatic logic fp_is_zero(input fp_t a);
    return a[30:23] == 8'd0;
  endfunction

  function automatic logic fp_is_special(input fp_t a);
    return a[30:23] == 8'hff;
  endfunction

  function automatic fp_t fp_neg(input fp_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic fp_t fp_abs(input fp_t a);
    return {1'b0, a[30:0]};
  endfunction

  // True when a is strictly negative (zero of either sign is not negative).
  function automatic logic fp_is_neg(input fp_t a);
    return a[31] && !fp_is_zero(a);
  endfunction

  function automatic fp_t fp_add(input fp_t a, input fp_t b);
    fp_t x, y;
    int d;
    logic [63:0] mx, my, ms, lost;
    logic sticky;
    if (fp_is_special(a)) return a;
    if (fp_is_special(b)) return b;
    if (fp_is_zero(a)) return fp_is_zero(b) ? FP_ZERO : b;
    if (fp_is_zero(b)) return a;
    // x gets the larger magnitude
    if (a[30:0] >= b[30:0]) begin
      x = a;
      y = b;
    end else begin
      x = b;
      y = a;
    end
    d = int'(x[30:23]) - int'(y[30:23]);
    mx = {2'b01, x[22:0], 39'd0};
    my = {2'b01, y[22:0], 39'd0};
    if (d >= 64) begin
      sticky = 1'b1;
      my = 64'd0;
    end else begin
      lost = my & ((64'd1 << d) - 64'd1);
      sticky = (lost != 64'd0);
      my = my >> d;
    end
    if (x[31] == y[31]) ms = mx + my;
    else ms = mx - my - {63'd0, sticky};
    ms[0] = ms[0] | sticky;
    if (ms == 64'd0) return FP_ZERO;
    return fp_pack(x[31], int'(x[30:23]) + 1, ms);
  endfunction

  function automatic fp_t fp_sub(input fp_t a, input fp_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic fp_t fp_mul(input fp_t a, input fp_t b);
    logic s;
    logic [47:0] p;
    s = a[31] ^ b[31];
    if (fp_is_special(a) || fp_is_special(b)) return {s, 8'hff, 23'd0};
    if (fp_is_zero(a) || fp_is_zero(b)) return FP_ZERO;
    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    return fp_pack(s, int'(a[30:23]) + int'(b[30:23]) - 127 + 1, {p, 16'd0});
  endfunction

  function automatic fp_t fp_div(input fp_t a, input fp_t b);
    logic s;
    logic [63:0] num, q, r;
    logic [63:0] den;
    s = a[31] ^ b[31];
    if (fp_is_special(a) || fp_is_zero(b)) return {s, 8'hff, 23'd0};
    if (fp_is_zero(a) || fp_is_special(b)) return FP_ZERO;
    num = {1'b1, a[22:0], 40'd0};
    den = {40'd0, 1'b1, b[22:0]};
    q = num / den;
    r = num % den;
    return fp_pack(s, int'(a[30:23]) - int'(b[30:23]) + 149, {q[62:0], r != 64'd0});
  endfunction

  // Integer square root of a 64-bit value by the digit-by-digit method.
  function automatic logic [32:0] isqrt64(input logic [63:0] x);
    logic [63:0] rem, root, bitv;
    rem = x;
    root = 64'd0;
    bitv = 64'h4000_0000_0000_0000;
    for (int i = 0; i < 32; i++) begin
      if (rem >= root + bitv) begin
        rem = rem - (root + bitv);
        root = (root >> 1) + bitv;
      end else begin
        root = root >> 1;
      end
      bitv = bitv >> 2;
    end
    // bit 32: inexact flag
    return {rem != 64'd0, root[31:0]};
  endfunction

  function automatic fp_t fp_sqrt(input fp_t a);
    int sh, ehalf;
    logic [63:0] x;
    logic [32:0] r;
    if (fp_is_zero(a)) return FP_ZERO;
    if (a[31]) return FP_NAN;
    if (fp_is_special(a)) return a;
    sh = a[23] ? 39 : 38;
    x = {40'd0, 1'b1, a[22:0]} << sh;
    r = isqrt64(x);
    ehalf = (int'(a[30:23]) - 150 - sh) >>> 1;
    return fp_pack(1'b0, ehalf - 1 + 127 + 63, {31'd0, r[31:0], r[32]});
  endfunction

  // a < b
  function automatic logic fp_lt(input fp_t a, input fp_t b);
    logic az, bz;
    az = fp_is_zero(a);
    bz = fp_is_zero(b);
    if (az && bz) return 1'b0;
    if (az) return !b[31];
    if (bz) return a[31];
    if (a[31] != b[31]) return a[31];
    if (!a[31]) return a[30:0] < b[30:0];
    return a[30:0] > b[30:0];
  endfunction

  function automatic fp_t fp_from_int(input int unsigned v);
    return fp_pack(1'b0, 190, {32'd0, v});
  endfunction

  // ---- Index arithmetic of the sparse formulation (n states, m inputs) ----

  // position of u_k[j] in xi
  function automatic int xi_u(input int n, input int m, input int k, input int j);
    return k * (n + m) + j;
  endfunction
  // position of x_(k+1)[j] in xi
  function automatic int xi_x(input int n, input int m, input int k, input int j);
    return k * (n + m) + m + j;
  endfunction
  // positions in the reordered primal-dual vector [u_k lambda_k x_(k+1)]
  function automatic int ro_u(input int n, input int m, input int k, input int j);
    return k * (2 * n + m) + j;
  endfunction
  function automatic int ro_lam(input int n, input int m, input int k, input int j);
    return k * (2 * n + m) + m + j;
  endfunction
  function automatic int ro_x(input int n, input int m, input int k, input int j);
    return k * (2 * n + m) + m + n + j;
  endfunction
  // reordered position of xi[i]
  function automatic int ro_of_xi(input int n, input int m, input int i);
    int k, j;
    k = i / (n + m);
    j = i % (n + m);
    return (j < m) ? ro_u(n, m, k, j) : ro_x(n, m, k, j - m);
  endfunction
  // reordered position of lambda[i]
  function automatic int ro_of_lam(input int n, input int m, input int i);
    return ro_lam(n, m, i / n, i % n);
  endfunction
  // index of the upper-bound inequality row acting on xi[i]; the matching
  // lower-bound row follows m (inputs) or n (states) positions later.
  function automatic int ic_up(input int n, input int m, input int i);
    int k, j;
    k = i / (n + m);
    j = i % (n + m);
    return (j < m) ? 2 * k * (n + m) + j : 2 * k * (n + m) + 2 * m + (j - m);
  endfunction
  function automatic int ic_lo(input int n, input int m, input int i);
    int j;
    j = i % (n + m);
    return ic_up(n, m, i) + ((j < m) ? m : n);
  endfunction

endpackage
