// at_mult: out = A^T * lam, where A is the equality-constraint matrix of the
// sparse MPC problem, [-B0 I; -A1 -B1 I; ...; -A(N-1) -B(N-1) I], which is
// never built: the product is taken directly from the stacked model matrices
// adn = [A0; A1; ...; AN] and bdn = [B0; ...; BN]. For input u_k[i] the
// element is -sum_j B_k[j][i]*lam_k[j]; for state x_(k+1)[i] it is
// lam_k[i] - sum_j A_(k+1)[j][i]*lam_(k+1)[j], and just lam_(N-1)[i] for x_N.
// One element of the N(n+m) outputs per cycle; start/done pulses; inputs
// held stable while busy.
// The formula and the use of the stacked model matrices instead of a sparse
// A follow the original HLS solver; the element-serial schedule is this
// design's choice.
module at_mult import mpc_pkg::*; #(
  parameter int NX = 3,
  parameter int NU = 2,
  parameter int NH = 5,
  localparam int NOV = NH * (NX + NU),
  localparam int NEC = NH * NX
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fp_t  adn [(NH+1)*NX][NX],
  input  fp_t  bdn [(NH+1)*NX][NU],
  input  fp_t  lam [NEC],
  output fp_t  out [NOV],
  output logic done
);
  localparam int IW = $clog2(NOV + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           elem;

  always_comb begin
    int k, r, i;
    i = 0;
    k = int'(idx) / (NX + NU);
    r = int'(idx) % (NX + NU);
    elem = FP_ZERO;
    if (r < NU) begin
      for (int j = 0; j < NX; j++)
        elem = fp_sub(elem, fp_mul(bdn[k*NX + j][r], lam[k*NX + j]));
    end else begin
      i = r - NU;
      elem = lam[k*NX + i];
      if (k < NH - 1)
        for (int j = 0; j < NX; j++)
          elem = fp_sub(elem, fp_mul(adn[(k+1)*NX + j][i], lam[(k+1)*NX + j]));
    end
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
      out[idx] <= elem;
      idx      <= idx + 1'b1;
      if (int'(idx) == NOV - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
