// rc_calc: inequality residual rc = C*xi - d + s for box constraints. C is
// not stored: per stage k the 2(n+m) rows are [u_k upper, u_k lower,
// x_(k+1) upper, x_(k+1) lower]; every input is bounded, and a state is
// bounded only where its bit in cp is set (C_p mask). Upper rows give
// xi - d + s, lower rows s - xi - d (the C row of an unbounded state is zero).
// One element per cycle; start/done pulses; inputs held stable while busy.
// Replacing C by the mask cp follows the original HLS solver; the row order
// of the bounds within a stage and the schedule are this design's choices.
module rc_calc import mpc_pkg::*; #(
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
  input  fp_t           xi [NOV],
  input  fp_t           d  [NIC],
  input  fp_t           s  [NIC],
  output fp_t           rc [NIC],
  output logic          done
);
  localparam int IW = $clog2(NIC + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           elem;

  always_comb begin
    int k, r;
    fp_t cx;
    k = int'(idx) / (2 * (NX + NU));
    r = int'(idx) % (2 * (NX + NU));
    if (r < NU) cx = xi[xi_u(NX, NU, k, r)];
    else if (r < 2 * NU) cx = fp_neg(xi[xi_u(NX, NU, k, r - NU)]);
    else if (r < 2 * NU + NX) cx = cp[r - 2*NU] ? xi[xi_x(NX, NU, k, r - 2*NU)] : FP_ZERO;
    else cx = cp[r - 2*NU - NX] ? fp_neg(xi[xi_x(NX, NU, k, r - 2*NU - NX)]) : FP_ZERO;
    elem = fp_add(fp_sub(cx, d[idx]), s[idx]);
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
      rc[idx] <= elem;
      idx     <= idx + 1'b1;
      if (int'(idx) == NIC - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
