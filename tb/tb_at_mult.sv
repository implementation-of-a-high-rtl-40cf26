// tb_at_mult: Checks at_mult (A^T * lambda from the stacked model matrices) against
//  the transpose of a dense equality matrix built independently, for random
//  model data, and checks the latency of one element per cycle.
module tb_at_mult;
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
  fp_t lam [NEC], out [NOV];
  logic clk = 0, rst = 1, start = 0, done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  at_mult dut (.clk, .rst, .start, .adn, .bdn, .lam, .out, .done);

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

      foreach (lam[e]) lam[e] = r2f(urand(-3, 3));
      run(lat);
      check(lat == NOV + 2, $sformatf("latency %0d", lat));
      for (int i = 0; i < NOV; i++) begin
        real ref_v;
        ref_v = 0.0;
        for (int e = 0; e < NEC; e++) ref_v += aeq[e*NOV+i] * f2r(lam[e]);
        check(close(f2r(out[i]), ref_v, 1e-5, 1e-5), $sformatf("out[%0d] %f vs %f", i, f2r(out[i]), ref_v));
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
