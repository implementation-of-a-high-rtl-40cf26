// kkt_assemble: builds the reordered, banded primal-dual system
//   A_ip * [du0 dlam0 dx1 du1 dlam1 dx2 ...] = b_ip
// in left-shift storage. Interleaving inputs, multipliers and states stage by
// stage turns the KKT matrix [H A^T; A 0] into a band of width 3n+m; each
// row of vala holds the non-zeros of one matrix row shifted left, and
// col_ind gives the column of its first entry. Row types of stage k:
//   u_k rows      at col k(2n+m):       [ H(u_k) | -B_k^T ]
//   lambda_k rows at col k(2n+m)-n:     [ -A_k | -B_k | 0 | I ]   (k > 0)
//                 at col 0 (k = 0):     [ -B_0 | 0 | I ]
//   x_(k+1) rows  at col k(2n+m)+m:     [ I | H(x_(k+1)) | 0 | -A_(k+1)^T ]
//                                       (last stage: [ I | H(x_N) ])
// Only the diagonal of H changes between interior-point iterations (weights
// are diagonal), so H enters as the vector hdiag. The right-hand side in the
// same order is b_ip = [-rn(u0) -rp(lam0) -rn(x1) ...]. One matrix row per
// cycle; start/done pulses; inputs held stable while busy.
// The stage-wise reordering and left-shift storage with width 3n+m follow
// the original HLS solver; computing the column offsets from the row type
// instead of reading them from a ROM is this design's choice.
module kkt_assemble import mpc_pkg::*; #(
  parameter int NX = 3,
  parameter int NU = 2,
  parameter int NH = 5,
  localparam int NOV = NH * (NX + NU),
  localparam int NEC = NH * NX,
  localparam int NR  = NH * (2 * NX + NU),
  localparam int Z   = 3 * NX + NU
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  fp_t         adn     [(NH+1)*NX][NX],
  input  fp_t         bdn     [(NH+1)*NX][NU],
  input  fp_t         hdiag   [NOV],
  input  fp_t         rn      [NOV],
  input  fp_t         rp      [NEC],
  output fp_t         vala    [NR][Z],
  output logic [15:0] col_ind [NR],
  output fp_t         bip     [NR],
  output logic        done
);
  localparam int SW = 2 * NX + NU;
  localparam int IW = $clog2(NR + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           row [Z];
  int            col;
  fp_t           rhs;

  always_comb begin
    int k, p, i;
    i = 0;
    k = int'(idx) / SW;
    p = int'(idx) % SW;
    for (int t = 0; t < Z; t++) row[t] = FP_ZERO;
    if (p < NU) begin
      // input row u_k[p]
      col = k * SW;
      row[p] = hdiag[xi_u(NX, NU, k, p)];
      for (int t = 0; t < NX; t++) row[NU + t] = fp_neg(bdn[k*NX + t][p]);
      rhs = fp_neg(rn[xi_u(NX, NU, k, p)]);
    end else if (p < NU + NX) begin
      // equality row lambda_k[i]
      i = p - NU;
      if (k == 0) begin
        col = 0;
        for (int t = 0; t < NU; t++) row[t] = fp_neg(bdn[i][t]);
        row[NU + NX + i] = FP_ONE;
      end else begin
        col = k * SW - NX;
        for (int t = 0; t < NX; t++) row[t] = fp_neg(adn[k*NX + i][t]);
        for (int t = 0; t < NU; t++) row[NX + t] = fp_neg(bdn[k*NX + i][t]);
        row[2*NX + NU + i] = FP_ONE;
      end
      rhs = fp_neg(rp[k*NX + i]);
    end else begin
      // state row x_(k+1)[i]
      i = p - NU - NX;
      col = k * SW + NU;
      row[i] = FP_ONE;
      row[NX + i] = hdiag[xi_x(NX, NU, k, i)];
      if (k < NH - 1)
        for (int t = 0; t < NX; t++) row[2*NX + NU + t] = fp_neg(adn[(k+1)*NX + t][i]);
      rhs = fp_neg(rn[xi_x(NX, NU, k, i)]);
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
      vala[idx]    <= row;
      col_ind[idx] <= 16'(col);
      bip[idx]     <= rhs;
      idx          <= idx + 1'b1;
      if (int'(idx) == NR - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
