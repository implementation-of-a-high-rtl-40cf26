// rp_calc: primal residual rp = A*xi - b of the equality constraints
// (prediction-model dynamics). Row k*n+i is
//   x_(k+1)[i] - sum_j A_k[i][j]*x_k[j] - sum_j B_k[i][j]*u_k[j] - b[k*n+i]
// with the A term absent for k = 0 (x0 enters through b). A is not stored:
// the stacked model matrices adn/bdn are read directly. One element per
// cycle; start/done pulses; inputs held stable while busy.
// The formula and the use of A_dN/B_dN follow the original HLS solver (row =
// state, column = input indexing throughout); the schedule is this design's
// choice.
module rp_calc import mpc_pkg::*; #(
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
  input  fp_t  xi  [NOV],
  input  fp_t  b   [NEC],
  output fp_t  rp  [NEC],
  output logic done
);
  localparam int IW = $clog2(NEC + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           elem;

  always_comb begin
    int k, i;
    k = int'(idx) / NX;
    i = int'(idx) % NX;
    elem = FP_ZERO;
    if (k > 0)
      for (int j = 0; j < NX; j++)
        elem = fp_sub(elem, fp_mul(adn[k*NX + i][j], xi[xi_x(NX, NU, k - 1, j)]));
    for (int j = 0; j < NU; j++)
      elem = fp_sub(elem, fp_mul(bdn[k*NX + i][j], xi[xi_u(NX, NU, k, j)]));
    elem = fp_sub(fp_add(elem, xi[xi_x(NX, NU, k, i)]), b[idx]);
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
      rp[idx] <= elem;
      idx     <= idx + 1'b1;
      if (int'(idx) == NEC - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
