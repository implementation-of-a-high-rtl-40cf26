// rn_calc: right-hand side term of the reduced primal-dual system,
//   rd = Q xi + q + A^T lam + C^T v
//   rn = rd + C^T S^-1 V rc - C^T v + sigma*mu*C^T S^-1 e.
// The three matrix products (qx, atl, ctv) come from cds_symv, at_mult and
// ct_mult. The C^T terms are taken per variable from its upper and lower
// bound rows: rn_i = rd_i + w_up - w_lo with w = v*rc/s - v + sigmu/s, and
// rn_i = rd_i for an unbounded state. One element per cycle; start/done
// pulses; inputs held stable while busy. sigmu is the product sigma*mu.
// The formula follows the reduced Newton system of the primal-dual method;
// summing the parts of rd here rather than storing rd is this design's
// choice.
module rn_calc import mpc_pkg::*; #(
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
  input  fp_t           qx    [NOV],
  input  fp_t           q     [NOV],
  input  fp_t           atl   [NOV],
  input  fp_t           ctv   [NOV],
  input  fp_t           v     [NIC],
  input  fp_t           s     [NIC],
  input  fp_t           rc    [NIC],
  input  fp_t           sigmu,
  output fp_t           rn    [NOV],
  output logic          done
);
  localparam int IW = $clog2(NOV + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           elem;

  function automatic fp_t wterm(input fp_t vi, input fp_t si, input fp_t rci, input fp_t sm);
    return fp_add(fp_sub(fp_div(fp_mul(vi, rci), si), vi), fp_div(sm, si));
  endfunction

  always_comb begin
    int r, up, lo;
    r  = int'(idx) % (NX + NU);
    up = ic_up(NX, NU, int'(idx));
    lo = ic_lo(NX, NU, int'(idx));
    elem = fp_add(fp_add(qx[idx], q[idx]), fp_add(atl[idx], ctv[idx]));
    if (r < NU || cp[(r < NU) ? 0 : r - NU])
      elem = fp_add(elem, fp_sub(wterm(v[up], s[up], rc[up], sigmu),
                                 wterm(v[lo], s[lo], rc[lo], sigmu)));
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
      rn[idx] <= elem;
      idx     <= idx + 1'b1;
      if (int'(idx) == NOV - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
