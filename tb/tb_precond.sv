// tb_precond: Checks precond (M_ii = 1/sqrt(sum_j |A_ij|), M*A*M in left-shift form,
//  M*b) against a direct evaluation of the formulas for a random band, and
//  its latency of two passes.
module tb_precond;
  import mpc_pkg::*;
  import tb_pkg::*;
  import tb_ref_pkg::*;
  localparam int NR = 40, Z = 11;
  fp_t vala [NR][Z], atil [NR][Z], bip [NR], btil [NR], mdiag [NR];
  logic [15:0] col_ind [NR];
  real mref[];
  logic clk = 0, rst = 1, start = 0, done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  precond #(.NR(NR), .Z(Z)) dut (.clk, .rst, .start, .vala, .col_ind, .bip, .atil, .btil, .mdiag, .done);

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
    mref = new[NR];
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < NR; i++) begin
        col_ind[i] = 16'((i < 4) ? 0 : ((i - 4 > NR - 5) ? NR - 5 : i - 4));
        for (int j = 0; j < Z; j++) vala[i][j] = (col_ind[i] + j < NR) ? r2f(urand(-5, 5)) : 32'h0;
        bip[i] = r2f(urand(-2, 2));
      end
      run(lat);
      check(lat == 2 * NR + 2, $sformatf("latency %0d", lat));
      for (int i = 0; i < NR; i++) begin
        real acc;
        acc = 0.0;
        for (int j = 0; j < Z; j++) acc += rabs(f2r(vala[i][j]));
        mref[i] = 1.0 / $sqrt(acc);
        check(close(f2r(mdiag[i]), mref[i], 1e-5, 0), $sformatf("M[%0d]", i));
      end
      for (int i = 0; i < NR; i++) begin
        check(close(f2r(btil[i]), mref[i] * f2r(bip[i]), 1e-5, 1e-7), $sformatf("btil[%0d]", i));
        for (int j = 0; j < Z; j++)
          if (col_ind[i] + j < NR)
            check(close(f2r(atil[i][j]), f2r(vala[i][j]) * mref[i] * mref[col_ind[i] + j], 1e-5, 1e-7), $sformatf("atil[%0d][%0d]", i, j));
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
