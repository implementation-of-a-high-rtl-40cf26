// tb_step_length: Checks step_length (alpha = min(1, -beta*z/dz over negative dz)) for
//  random directions, for directions that never shrink (alpha = 1), and
//  that alpha keeps v and s positive.
module tb_step_length;
  import mpc_pkg::*;
  import tb_pkg::*;
  import tb_ref_pkg::*;
  localparam int NIC = 50;
  fp_t v [NIC], dv [NIC], s [NIC], ds [NIC], alpha, beta;
  logic clk = 0, rst = 1, start = 0, done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  step_length #(.NIC(NIC)) dut (.clk, .rst, .start, .beta, .v, .dv, .s, .ds, .alpha, .done);

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
    beta = r2f(0.95);
    for (int t = 0; t < 6; t++) begin
      real ref_a, z, dz;
      foreach (v[c]) begin
        v[c] = r2f(urand(0.01, 2)); s[c] = r2f(urand(0.01, 2));
        dv[c] = r2f((t == 0) ? urand(0, 1) : urand(-3, 1));
        ds[c] = r2f((t == 0) ? urand(0, 1) : urand(-3, 1));
      end
      run(lat);
      check(lat == NIC + 2, $sformatf("latency %0d", lat));
      ref_a = 1.0;
      for (int c = 0; c < NIC; c++) begin
        if (f2r(dv[c]) < 0 && -0.95 * f2r(v[c]) / f2r(dv[c]) < ref_a) ref_a = -f2r(beta) * f2r(v[c]) / f2r(dv[c]);
        if (f2r(ds[c]) < 0 && -0.95 * f2r(s[c]) / f2r(ds[c]) < ref_a) ref_a = -f2r(beta) * f2r(s[c]) / f2r(ds[c]);
      end
      check(close(f2r(alpha), ref_a, 1e-5, 0), $sformatf("alpha %f vs %f", f2r(alpha), ref_a));
      if (t == 0) check(alpha == 32'h3f800000, "full step when nothing shrinks");
      for (int c = 0; c < NIC; c++) begin
        z = f2r(v[c]) + f2r(alpha) * f2r(dv[c]);
        dz = f2r(s[c]) + f2r(alpha) * f2r(ds[c]);
        check(z > 0 && dz > 0, "iterates stay positive");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
