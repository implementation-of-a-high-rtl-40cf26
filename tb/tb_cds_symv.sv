// tb_cds_symv: Checks cds_symv (symmetric compressed-diagonal matrix times vector) with
//  three stored diagonals at offsets 0, 1 and 3 against the product with
//  the expanded dense symmetric matrix, and with the diagonal-only form
//  used by the solver.
module tb_cds_symv;
  import mpc_pkg::*;
  import tb_pkg::*;
  import tb_ref_pkg::*;
  localparam int NV = 25, ND = 3;
  fp_t val [NV][ND], vect [NV], out [NV];
  logic [15:0] col_ind [ND];
  fp_t val1 [NV][1], out1 [NV];
  logic [15:0] col1 [1];
  logic done1;
  real dense[];
  logic clk = 0, rst = 1, start = 0, done;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  cds_symv #(.NV(NV), .NDIAG(ND)) dut (.clk, .rst, .start, .val, .col_ind, .vect, .out, .done);
  cds_symv #(.NV(NV), .NDIAG(1)) dut1 (.clk, .rst, .start, .val(val1), .col_ind(col1), .vect, .out(out1), .done(done1));

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
    col_ind = '{16'd0, 16'd1, 16'd3};
    col1 = '{16'd0};
    for (int t = 0; t < 3; t++) begin
      dense = new[NV*NV];
      foreach (dense[k]) dense[k] = 0.0;
      for (int i = 0; i < NV; i++) for (int j = 0; j < ND; j++) begin
        val[i][j] = (i + col_ind[j] < NV) ? r2f(urand(-2, 2)) : 32'h0;
        if (i + col_ind[j] < NV) begin
          dense[i*NV + i + col_ind[j]] = f2r(val[i][j]);
          dense[(i + col_ind[j])*NV + i] = f2r(val[i][j]);
        end
      end
      for (int i = 0; i < NV; i++) begin val1[i][0] = val[i][0]; vect[i] = r2f(urand(-2, 2)); end
      run(lat);
      check(lat == NV + 2, $sformatf("latency %0d", lat));
      for (int i = 0; i < NV; i++) begin
        real ref_v;
        ref_v = 0.0;
        for (int j = 0; j < NV; j++) ref_v += dense[i*NV+j] * f2r(vect[j]);
        check(close(f2r(out[i]), ref_v, 1e-5, 1e-5), $sformatf("out[%0d] %f vs %f", i, f2r(out[i]), ref_v));
        check(close(f2r(out1[i]), f2r(val[i][0]) * f2r(vect[i]), 1e-6, 1e-7), $sformatf("diag out[%0d]", i));
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
