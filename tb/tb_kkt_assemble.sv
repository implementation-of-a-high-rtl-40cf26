// tb_kkt_assemble: Checks kkt_assemble: expands every left-shift row it writes back to a
//  dense row and compares the result with the dense KKT matrix [H A^T; A 0]
//  built independently and permuted to the stage-wise order [u_k lambda_k
//  x_(k+1)]; checks that no non-zero of the dense matrix falls outside a
//  stored band, and the right-hand side [-rn; -rp] in the same order.
module tb_kkt_assemble;
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
  localparam int NR = NH * (2 * NX + NU), Z = 3 * NX + NU;
  fp_t hdiag [NOV], rn [NOV], rp [NEC], vala [NR][Z], bip [NR];
  logic [15:0] col_ind [NR];
  real kd[];
  int perm_xi[NOV], perm_lam[NEC];
  logic clk = 0, rst = 1, start = 0, done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  kkt_assemble dut (.clk, .rst, .start, .adn, .bdn, .hdiag, .rn, .rp, .vala, .col_ind, .bip, .done);

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

    // stage-wise order, written out independently of the design's index helpers
    for (int k = 0; k < NH; k++) begin
      for (int j = 0; j < NU; j++) perm_xi[k*(NX+NU) + j] = k*(2*NX+NU) + j;
      for (int j = 0; j < NX; j++) perm_lam[k*NX + j] = k*(2*NX+NU) + NU + j;
      for (int j = 0; j < NX; j++) perm_xi[k*(NX+NU) + NU + j] = k*(2*NX+NU) + NU + NX + j;
    end
    for (int t = 0; t < 3; t++) begin

      ad = new[(NH+1)*NX*NX]; bd = new[(NH+1)*NX*NU]; cpb = new[NX];
      for (int r = 0; r < (NH+1)*NX; r++) begin
        for (int j = 0; j < NX; j++) begin adn[r][j] = r2f(urand(-2, 2)); ad[r*NX+j] = f2r(adn[r][j]); end
        for (int j = 0; j < NU; j++) begin bdn[r][j] = r2f(urand(-2, 2)); bd[r*NU+j] = f2r(bdn[r][j]); end
      end
      cp = 3'b101;
      for (int j = 0; j < NX; j++) cpb[j] = cp[j];
      build(NX, NU, NH, ad, bd, cpb, aeq, cc);

      foreach (hdiag[i]) begin hdiag[i] = r2f(urand(0.5, 9)); rn[i] = r2f(urand(-2, 2)); end
      foreach (rp[e]) rp[e] = r2f(urand(-2, 2));
      kd = new[NR*NR];
      foreach (kd[q]) kd[q] = 0.0;
      for (int i = 0; i < NOV; i++) kd[perm_xi[i]*NR + perm_xi[i]] = f2r(hdiag[i]);
      for (int e = 0; e < NEC; e++) for (int i = 0; i < NOV; i++) begin
        kd[perm_lam[e]*NR + perm_xi[i]] = aeq[e*NOV+i];
        kd[perm_xi[i]*NR + perm_lam[e]] = aeq[e*NOV+i];
      end
      run(lat);
      check(lat == NR + 2, $sformatf("latency %0d", lat));
      for (int r = 0; r < NR; r++) begin
        for (int c = 0; c < NR; c++) begin
          real g;
          g = (c >= col_ind[r] && c < col_ind[r] + Z) ? f2r(vala[r][c - col_ind[r]]) : 0.0;
          check(g == kd[r*NR+c], $sformatf("K[%0d][%0d] %f vs %f", r, c, g, kd[r*NR+c]));
        end
      end
      for (int i = 0; i < NOV; i++) check(bip[perm_xi[i]] == (rn[i] ^ 32'h8000_0000), $sformatf("rhs of xi[%0d]", i));
      for (int e = 0; e < NEC; e++) check(bip[perm_lam[e]] == (rp[e] ^ 32'h8000_0000), $sformatf("rhs of lam[%0d]", e));
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
