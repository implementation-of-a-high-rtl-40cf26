// tb_minres: Checks minres on symmetric indefinite banded systems of the solver's
//  size (40 unknowns, band of 11 in left-shift storage, 40 iterations): the
//  result must match a double-precision Gaussian-elimination solve, must
//  leave a small residual, must keep a warm start that is already the
//  solution, and must take the same number of cycles every time.
module tb_minres;
  import mpc_pkg::*;
  import tb_pkg::*;
  import tb_ref_pkg::*;
  localparam int NR = 40, Z = 11, HB = 5;
  fp_t aval [NR][Z], b [NR], x0 [NR], x [NR];
  logic [15:0] col_ind [NR];
  real dm[], dmc[], rb[], xs[];
  int lat0;
  logic clk = 0, rst = 1, start = 0, done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  minres #(.NR(NR), .Z(Z), .ITERS(NR)) dut (.clk, .rst, .start, .aval, .col_ind, .b, .x0, .x, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // start the unit and return the number of cycles until done
  task automatic run(output int lat);
    int t0;
    @(posedge clk);
    start <= 1;
    t0 = cyc;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    lat = cyc - t0;
  endtask

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 4; t++) begin
      real res, nb;
      dm = new[NR*NR]; rb = new[NR];
      foreach (dm[q]) dm[q] = 0.0;
      for (int i = 0; i < NR; i++) begin
        dm[i*NR+i] = f2r(r2f(((i % 3 == 2) ? -1.0 : 1.0) * urand(3, 6)));
        for (int j = i + 1; j <= i + HB && j < NR; j++) begin
          dm[i*NR+j] = f2r(r2f(urand(-1, 1)));
          dm[j*NR+i] = dm[i*NR+j];
        end
        rb[i] = f2r(r2f(urand(-2, 2)));
      end
      for (int i = 0; i < NR; i++) begin
        int c0;
        c0 = (i < HB) ? 0 : ((i - HB > NR - Z) ? NR - Z : i - HB);
        col_ind[i] = 16'(c0);
        for (int j = 0; j < Z; j++) aval[i][j] = (c0 + j < NR) ? r2f(dm[i*NR + c0 + j]) : 32'h0;
        b[i] = r2f(rb[i]);
      end
      dmc = new[NR*NR](dm);
      gauss(NR, dmc, rb, xs);
      for (int i = 0; i < NR; i++) x0[i] = (t == 3) ? r2f(xs[i]) : 32'h0;
      run(lat);
      if (t == 0) lat0 = lat;
      check(lat == lat0, $sformatf("latency %0d vs %0d", lat, lat0));
      nb = 0.0; res = 0.0;
      for (int i = 0; i < NR; i++) begin
        real r;
        r = -f2r(b[i]);
        for (int j = 0; j < NR; j++) r += dm[i*NR+j] * f2r(x[j]);
        res += r * r;
        nb += f2r(b[i]) * f2r(b[i]);
        check(close(f2r(x[i]), xs[i], 1e-3, 1e-3), $sformatf("x[%0d] %f vs %f", i, f2r(x[i]), xs[i]));
      end
      check(res < 1e-8 * nb, $sformatf("relative residual %g", $sqrt(res / nb)));
    end
    $display("minres latency %0d cycles", lat0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
