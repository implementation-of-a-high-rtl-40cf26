// tb_rc_calc: Checks rc_calc (rc = C*xi - d + s) against a dense box-constraint matrix
//  built independently with a partial constrained-state mask.
module tb_rc_calc;
  import mpc_pkg::*;
  import tb_pkg::*;
  import tb_ref_pkg::*;
  localparam int NX = 3, NU = 2, NH = 5;
  localparam int NOV = NH * (NX + NU), NEC = NH * NX, NIC = 2 * NH * (NX + NU);

  fp_t adn [(NH+1)*NX][NX];
  fp_t bdn [(NH+1)*NX][NU];
  real ad[], bd[], aeq[], cc[];
  bit cpb[];
  logic [NX-1:0] cp;
  fp_t xi [NOV], d [NIC], s [NIC], rc [NIC];
  logic clk = 0, rst = 1, start = 0, done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  rc_calc dut (.clk, .rst, .start, .cp, .xi, .d, .s, .rc, .done);

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

    for (int t = 0; t < 3; t++) begin

      ad = new[(NH+1)*NX*NX]; bd = new[(NH+1)*NX*NU]; cpb = new[NX];
      for (int r = 0; r < (NH+1)*NX; r++) begin
        for (int j = 0; j < NX; j++) begin adn[r][j] = r2f(urand(-2, 2)); ad[r*NX+j] = f2r(adn[r][j]); end
        for (int j = 0; j < NU; j++) begin bdn[r][j] = r2f(urand(-2, 2)); bd[r*NU+j] = f2r(bdn[r][j]); end
      end
      cp = 3'b101;
      for (int j = 0; j < NX; j++) cpb[j] = cp[j];
      build(NX, NU, NH, ad, bd, cpb, aeq, cc);

      if (t == 1) begin cp = 3'b010; foreach (cpb[j]) cpb[j] = cp[j]; build(NX, NU, NH, ad, bd, cpb, aeq, cc); end
      foreach (xi[i]) xi[i] = r2f(urand(-3, 3));
      foreach (d[c]) d[c] = r2f(urand(0, 3));
      foreach (s[c]) s[c] = r2f(urand(0, 3));
      run(lat);
      check(lat == NIC + 2, $sformatf("latency %0d", lat));
      for (int c = 0; c < NIC; c++) begin
        real ref_v;
        ref_v = f2r(s[c]) - f2r(d[c]);
        for (int i = 0; i < NOV; i++) ref_v += cc[c*NOV+i] * f2r(xi[i]);
        check(close(f2r(rc[c]), ref_v, 1e-5, 1e-5), $sformatf("rc[%0d] %f vs %f", c, f2r(rc[c]), ref_v));
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
