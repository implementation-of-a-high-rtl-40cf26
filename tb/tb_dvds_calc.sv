// tb_dvds_calc: Checks dvds_calc (dv = S^-1 V (C dxi + rc - s + sigma*mu/v), ds = -s - S
//  V^-1 dv + sigma*mu/v) against a dense evaluation with an independently
//  built C.
module tb_dvds_calc;
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
  fp_t dxi [NOV], rc [NIC], v [NIC], s [NIC], dv [NIC], ds [NIC];
  fp_t sigmu;
  logic clk = 0, rst = 1, start = 0, done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dvds_calc dut (.clk, .rst, .start, .cp, .dxi, .rc, .v, .s, .sigmu, .dv, .ds, .done);

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

      foreach (dxi[i]) dxi[i] = r2f(urand(-2, 2));
      foreach (v[c]) begin v[c] = r2f(urand(0.05, 3)); s[c] = r2f(urand(0.05, 3)); rc[c] = r2f(urand(-2, 2)); end
      sigmu = r2f(urand(0.01, 1));
      run(lat);
      check(lat == NIC + 2, $sformatf("latency %0d", lat));
      for (int c = 0; c < NIC; c++) begin
        real cdx, rdv, rds, vv, ss, sm;
        cdx = 0.0;
        for (int i = 0; i < NOV; i++) cdx += cc[c*NOV+i] * f2r(dxi[i]);
        vv = f2r(v[c]); ss = f2r(s[c]); sm = f2r(sigmu);
        rdv = vv / ss * (cdx + f2r(rc[c]) - ss + sm / vv);
        rds = -ss - ss / vv * rdv + sm / vv;
        check(close(f2r(dv[c]), rdv, 1e-4, 1e-4), $sformatf("dv[%0d] %f vs %f", c, f2r(dv[c]), rdv));
        check(close(f2r(ds[c]), rds, 1e-4, 1e-4), $sformatf("ds[%0d] %f vs %f", c, f2r(ds[c]), rds));
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
