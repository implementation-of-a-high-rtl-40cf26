// dvds_calc: search directions of the inequality multipliers and slacks,
//   dv = S^-1 V (C dxi + rc - s + sigmu V^-1 e)
//   ds = -s - V^-1 S dv + sigmu V^-1 e,
// element by element over the 2N(n+m) inequality rows. C dxi for a row is
// +dxi or -dxi of the bounded variable (zero for an unbounded state row).
// One row per cycle; start/done pulses; inputs held stable while busy.
// The formulas follow the primal-dual method; the schedule is this design's
// choice.
module dvds_calc import mpc_pkg::*; #(
  parameter int NX = 3,
  parameter int NU = 2,
  parameter int NH = 5,
  localparam int NOV = NH * (NX + NU),
  localparam int NIC = 2 * NH * (NX + NU)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NX-1:0] cp,
  input  fp_t           dxi [NOV],
  input  fp_t           rc  [NIC],
  input  fp_t           v   [NIC],
  input  fp_t           s   [NIC],
  input  fp_t           sigmu,
  output fp_t           dv  [NIC],
  output fp_t           ds  [NIC],
  output logic          done
);
  localparam int IW = $clog2(NIC + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           dv_e, ds_e;

  always_comb begin
    int k, r;
    fp_t cdx, smv;
    k = int'(idx) / (2 * (NX + NU));
    r = int'(idx) % (2 * (NX + NU));
    if (r < NU) cdx = dxi[xi_u(NX, NU, k, r)];
    else if (r < 2 * NU) cdx = fp_neg(dxi[xi_u(NX, NU, k, r - NU)]);
    else if (r < 2 * NU + NX) cdx = cp[r - 2*NU] ? dxi[xi_x(NX, NU, k, r - 2*NU)] : FP_ZERO;
    else cdx = cp[r - 2*NU - NX] ? fp_neg(dxi[xi_x(NX, NU, k, r - 2*NU - NX)]) : FP_ZERO;
    smv  = fp_div(sigmu, v[idx]);
    dv_e = fp_div(fp_mul(v[idx], fp_add(fp_sub(fp_add(cdx, rc[idx]), s[idx]), smv)), s[idx]);
    ds_e = fp_add(fp_sub(fp_neg(s[idx]), fp_div(fp_mul(s[idx], dv_e), v[idx])), smv);
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      idx  <= '0;
    end else if (start) begin
      busy <= 1'b1;
      idx  <= '0;
    end else if (busy) begin
      dv[idx] <= dv_e;
      ds[idx] <= ds_e;
      idx     <= idx + 1'b1;
      if (int'(idx) == NIC - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
