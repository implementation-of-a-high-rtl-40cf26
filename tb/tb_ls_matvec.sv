// tb_ls_matvec: Checks ls_matvec (left-shift banded matrix times vector) against the
//  product with the expanded dense matrix, including rows whose band runs
//  past the last column.
module tb_ls_matvec;
  import mpc_pkg::*;
  import tb_pkg::*;
  import tb_ref_pkg::*;
  localparam int NR = 40, Z = 11;
  fp_t val [NR][Z], vect [NR], out [NR];
  logic [15:0] col_ind [NR];
  logic clk = 0, rst = 1, start = 0, done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ls_matvec #(.NR(NR), .Z(Z)) dut (.clk, .rst, .start, .val, .col_ind, .vect, .out, .done);

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
      for (int i = 0; i < NR; i++) begin
        col_ind[i] = 16'((i > 5) ? ((i - 5 + NR - Z > NR - Z) ? NR - Z + (i % 3) : i - 5) : 0);
        for (int j = 0; j < Z; j++) val[i][j] = (col_ind[i] + j < NR) ? r2f(urand(-2, 2)) : r2f(7.0);
        vect[i] = r2f(urand(-2, 2));
      end
      run(lat);
      check(lat == NR + 2, $sformatf("latency %0d", lat));
      for (int i = 0; i < NR; i++) begin
        real ref_v;
        ref_v = 0.0;
        for (int j = 0; j < Z; j++) if (col_ind[i] + j < NR) ref_v += f2r(val[i][j]) * f2r(vect[col_ind[i] + j]);
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
