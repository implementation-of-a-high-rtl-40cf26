// tb_qp_horizon10: runs the accelerator on the three-state vehicle case
// with the longest prediction horizon of the horizon sweep, N = 10
// (N(n+m) = 50 variables, a KKT system of order 80 and 80 MINRES
// iterations), by building the top with NH = 10. Data, stream handling and
// checks are those of the default-size end-to-end test. The latency is
// only reported: at this horizon the solve is expected to take about as
// long as a 10 ms control period at 100 MHz, and the bound checked here,
// 2,000,000 cycles, is this testbench's choice.
module tb_qp_horizon10;
  import tb_pkg::*;
  import tb_ref_pkg::*;

  localparam int NX = 3, NU = 2, NH = 10;
  localparam int NOV = NH * (NX + NU), NEC = NH * NX, NIC = 2 * NH * (NX + NU);
  localparam int NA = (NH + 1) * NX * NX, NB = (NH + 1) * NX * NU;
  localparam int NWORD = NA + NB + NIC + NX;
  localparam real TS = 0.01, LEN = 0.2, VREF = 1.0, PHIREF = 0.2, PI = 3.14159265358979;
  localparam int MAX_LAT = 2000000;

  logic clk = 0, rst = 1;
  logic ap_start = 0, ap_done, ap_idle;
  logic [31:0] s_tdata, m_tdata;
  logic s_tvalid = 0, s_tready, s_tlast = 0, m_tvalid, m_tready = 0, m_tlast;

  qp_solver #(.NH(NH)) dut (
    .clk, .rst, .ap_start, .ap_done, .ap_idle,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_bp = 0, n_clip = 0, n_full = 0, n_active = 0;
  real ad[], bd[], d[], x0[], qd[], ql[], xref[], aref[], aeq[], cc[];
  bit cp[];
  logic [31:0] words[$];
  real got[NOV];
  int cyc, t0, t1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  always @(posedge clk) begin
    if (s_tready && !s_tvalid) n_in_stall++;
    if (m_tvalid && !m_tready) n_out_bp++;
    if (dut.step_valid) begin
      if (dut.step_alpha == 32'h3f80_0000) n_full++;
      else n_clip++;
    end
  end

  initial begin
    real th, thp;
    int k;
    cyc = 0;
    ad = new[(NH+1)*NX*NX]; bd = new[(NH+1)*NX*NU]; d = new[NIC]; x0 = new[NX];
    qd = new[NOV]; ql = new[NOV]; cp = new[NX];
    cp[0] = 0; cp[1] = 0; cp[2] = 1;
    for (k = 0; k <= NH; k++) begin
      th = PI / 2 + k * TS * VREF / LEN * $tan(PHIREF);
      ad[(k*NX+0)*NX+0] = 1; ad[(k*NX+0)*NX+1] = 0; ad[(k*NX+0)*NX+2] = -TS * VREF * $sin(th);
      ad[(k*NX+1)*NX+0] = 0; ad[(k*NX+1)*NX+1] = 1; ad[(k*NX+1)*NX+2] = TS * VREF * $cos(th);
      ad[(k*NX+2)*NX+0] = 0; ad[(k*NX+2)*NX+1] = 0; ad[(k*NX+2)*NX+2] = 1;
      bd[(k*NX+0)*NU+0] = TS * $cos(th); bd[(k*NX+0)*NU+1] = 0;
      bd[(k*NX+1)*NU+0] = TS * $sin(th); bd[(k*NX+1)*NU+1] = 0;
      bd[(k*NX+2)*NU+0] = TS / LEN * $tan(PHIREF);
      bd[(k*NX+2)*NU+1] = TS * VREF / LEN * (1 + $tan(PHIREF) * $tan(PHIREF));
    end
    for (k = 0; k < NH; k++) begin
      thp = PI / 2 + (k + 1) * TS * VREF / LEN * $tan(PHIREF);
      d[2*k*(NX+NU) + 0] = 1.5 - VREF;   d[2*k*(NX+NU) + 2] = 1.5 + VREF;
      d[2*k*(NX+NU) + 1] = 0.65 - PHIREF; d[2*k*(NX+NU) + 3] = 0.65 + PHIREF;
      d[2*k*(NX+NU) + 4] = 10.0; d[2*k*(NX+NU) + 5] = 10.0; d[2*k*(NX+NU) + 6] = PI - thp;
      d[2*k*(NX+NU) + 7] = 10.0; d[2*k*(NX+NU) + 8] = 10.0; d[2*k*(NX+NU) + 9] = PI + thp;
      qd[k*(NX+NU)+0] = 1; qd[k*(NX+NU)+1] = 1;
      qd[k*(NX+NU)+2] = (k == NH-1) ? 200 : 10; qd[k*(NX+NU)+3] = (k == NH-1) ? 200 : 10;
      qd[k*(NX+NU)+4] = (k == NH-1) ? 10 : 0.5;
    end
    foreach (ql[i]) ql[i] = 0.0;
    x0[0] = -1.0; x0[1] = -1.0; x0[2] = 0.0 - PI / 2;
    // the design works in binary32: give the reference the same rounded data
    foreach (ad[i]) ad[i] = f2r(r2f(ad[i]));
    foreach (bd[i]) bd[i] = f2r(r2f(bd[i]));
    foreach (d[i]) d[i] = f2r(r2f(d[i]));
    foreach (x0[i]) x0[i] = f2r(r2f(x0[i]));
    foreach (ad[i]) words.push_back(r2f(ad[i]));
    foreach (bd[i]) words.push_back(r2f(bd[i]));
    foreach (d[i]) words.push_back(r2f(d[i]));
    foreach (x0[i]) words.push_back(r2f(x0[i]));
    ipm(NX, NU, NH, 12, ad, bd, d, x0, qd, ql, cp, 0.1, 0.95, xref, aref);

    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(ap_idle, "idle after reset");
    ap_start <= 1;
    t0 = cyc;
    @(posedge clk);
    ap_start <= 0;
    // stream in with random gaps
    fork
      begin
        int w;
        w = 0;
        while (w < NWORD) begin
          if ($urandom % 4 == 0) begin
            s_tvalid <= 0;
            @(posedge clk);
          end else begin
            s_tvalid <= 1;
            s_tdata  <= words[w];
            s_tlast  <= (w == NWORD - 1);
            @(posedge clk);
            if (s_tready) w++;
          end
        end
        s_tvalid <= 0;
        s_tlast <= 0;
      end
      begin
        int r;
        r = 0;
        while (r < NOV) begin
          m_tready <= ($urandom % 3 != 0);
          @(posedge clk);
          if (m_tvalid && m_tready) begin
            got[r] = f2r(m_tdata);
            check(m_tlast == (r == NOV - 1), "tlast position");
            r++;
          end
        end
        m_tready <= 0;
      end
    join
    while (!ap_done) @(posedge clk);
    t1 = cyc;
    $display("solve latency %0d cycles (input stall %0d, output back-pressure %0d)", t1 - t0, n_in_stall, n_out_bp);
    check(t1 - t0 <= MAX_LAT, "latency within the reported bound");

    for (int i = 0; i < NOV; i++) begin
      if (i < 8) $display("xi[%0d] = %f  reference %f", i, got[i], xref[i]);
      check(close(got[i], xref[i], 0.02, 0.02), $sformatf("xi[%0d] %f vs reference %f", i, got[i], xref[i]));
    end
    // plan consistency: dynamics and bounds
    build(NX, NU, NH, ad, bd, cp, aeq, cc);
    for (int e = 0; e < NEC; e++) begin
      real t;
      t = (e < NX) ? 0.0 : 0.0;
      for (int j = 0; j < NX; j++) if (e < NX) t -= ad[e*NX+j] * x0[j];
      for (int i = 0; i < NOV; i++) t += aeq[e*NOV+i] * got[i];
      check(rabs(t) < 2e-3, $sformatf("equality row %0d residual %g", e, t));
    end
    for (int c = 0; c < NIC; c++) begin
      real t;
      t = 0.0;
      for (int i = 0; i < NOV; i++) t += cc[c*NOV+i] * got[i];
      check(t <= d[c] + 1e-3, $sformatf("bound row %0d: %f > %f", c, t, d[c]));
      if (d[c] - t < 1e-2) n_active++;
    end
    $display("steps: %0d clipped, %0d full; %0d bounds active", n_clip, n_full, n_active);
    check(n_in_stall > 0, "input stall exercised");
    check(n_out_bp > 0, "output back-pressure exercised");
    check(n_clip > 0, "clipped step exercised");
    check(n_full > 0, "full step exercised");
    check(n_active > 0, "active bound at solution");
    check(ap_idle, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
