// tb_b_calc: Checks b_calc (b = [A0*x0; 0 ...]) for random A0 and x0.
module tb_b_calc;
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
  fp_t x0 [NX], b [NEC];
  logic clk = 0, rst = 1, start = 0, done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  b_calc dut (.clk, .rst, .start, .adn, .x0, .b, .done);

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

      foreach (x0[j]) x0[j] = r2f(urand(-3, 3));
      run(lat);
      check(lat == NEC + 2, $sformatf("latency %0d", lat));
      for (int e = 0; e < NEC; e++) begin
        real ref_v;
        ref_v = 0.0;
        if (e < NX) for (int j = 0; j < NX; j++) ref_v += ad[e*NX+j] * f2r(x0[j]);
        check(close(f2r(b[e]), ref_v, 1e-5, 1e-6), $sformatf("b[%0d] %f vs %f", e, f2r(b[e]), ref_v));
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
