// tb_ip_algorithm: Checks ip_algorithm, the complete interior-point solve, on random stable
//  prediction models with random diagonal weights, linear terms and box
//  bounds tight enough to be active. Each solution and every step length
//  must match a double-precision dense reference running the same
//  iteration; the solve must produce one step per iteration and take the
//  same number of cycles each time.
module tb_ip_algorithm;
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
  fp_t d [NIC], b [NEC], qdiag [NOV], q [NOV], xi [NOV], step_alpha;
  logic step_valid;
  real rd[], rx0[], rqd[], rql[], xref[], aref[];
  real alphas[$];
  int lat0, n_clip;
  logic clk = 0, rst = 1, start = 0, done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ip_algorithm dut (.clk, .rst, .start, .adn, .bdn, .d, .b, .qdiag, .q, .cp, .xi, .done, .step_valid, .step_alpha);

  always @(posedge clk) if (step_valid) alphas.push_back(f2r(step_alpha));

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

    n_clip = 0;
    for (int t = 0; t < 3; t++) begin
      ad = new[(NH+1)*NX*NX]; bd = new[(NH+1)*NX*NU]; cpb = new[NX];
      for (int r = 0; r < (NH+1)*NX; r++) begin
        for (int j = 0; j < NX; j++) begin
          adn[r][j] = r2f(((r % NX) == j ? 1.0 : 0.0) + urand(-0.1, 0.1)); ad[r*NX+j] = f2r(adn[r][j]);
        end
        for (int j = 0; j < NU; j++) begin bdn[r][j] = r2f(urand(-0.3, 0.3)); bd[r*NU+j] = f2r(bdn[r][j]); end
      end
      cp = (t == 0) ? 3'b100 : ((t == 1) ? 3'b011 : 3'b111);
      foreach (cpb[j]) cpb[j] = cp[j];
      rd = new[NIC]; rx0 = new[NX]; rqd = new[NOV]; rql = new[NOV];
      foreach (d[c]) begin d[c] = r2f(urand(0.3, 1.5)); rd[c] = f2r(d[c]); end
      foreach (rx0[j]) rx0[j] = f2r(r2f(urand(-2, 2)));
      foreach (qdiag[i]) begin
        qdiag[i] = r2f(urand(0.5, 10)); rqd[i] = f2r(qdiag[i]);
        q[i] = r2f(urand(-1, 1)); rql[i] = f2r(q[i]);
      end
      for (int e = 0; e < NEC; e++) begin
        real acc;
        acc = 0.0;
        if (e < NX) for (int j = 0; j < NX; j++) acc += ad[e*NX+j] * rx0[j];
        b[e] = r2f(acc);
      end
      ipm(NX, NU, NH, 12, ad, bd, rd, rx0, rqd, rql, cpb, 0.1, 0.95, xref, aref);
      alphas.delete();
      run(lat);
      if (t == 0) lat0 = lat;
      check(lat == lat0, $sformatf("latency %0d vs %0d", lat, lat0));
      check(alphas.size() == 12, $sformatf("%0d steps", alphas.size()));
      for (int k = 0; k < alphas.size() && k < 12; k++) begin
        if (alphas[k] < 1.0) n_clip++;
        check(close(alphas[k], aref[k], 0.02, 0.01), $sformatf("step %0d alpha %f vs %f", k, alphas[k], aref[k]));
      end
      for (int i = 0; i < NOV; i++)
        check(close(f2r(xi[i]), xref[i], 0.02, 0.02), $sformatf("xi[%0d] %f vs %f", i, f2r(xi[i]), xref[i]));
    end
    check(n_clip > 0, "some steps clipped by the boundary");
    $display("ip_algorithm latency %0d cycles, %0d clipped steps", lat0, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
