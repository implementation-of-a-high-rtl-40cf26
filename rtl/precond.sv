// precond: diagonal (Jacobi-like) preconditioning of the banded primal-dual
// system. Pass 1 (one row per cycle) forms
//   M_ii = 1 / sqrt(sum_j |vala[i][j]|)
// over the left-shift row (a zero row gives M_ii = 1). Pass 2 (one row per
// cycle) scales the system symmetrically,
//   atil[i][j] = vala[i][j] * M_ii * M_cc   with c = col_ind[i] + j,
//   btil[i]    = M_ii * bip[i],
// entries whose column lies past the last row being set to zero. The
// solution of the scaled system y gives the original one as M*y.
// Timing: start pulse, 2*NR cycles, done pulse; inputs held while busy.
// The preconditioner M_ii = 1/sqrt(sum_j |A_ij|) follows the original HLS
// solver; the zero-row guard and two-pass schedule are this design's
// choices.
module precond import mpc_pkg::*; #(
  parameter int NR = 40,
  parameter int Z  = 11
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  fp_t         vala    [NR][Z],
  input  logic [15:0] col_ind [NR],
  input  fp_t         bip     [NR],
  output fp_t         atil    [NR][Z],
  output fp_t         btil    [NR],
  output fp_t         mdiag   [NR],
  output logic        done
);
  localparam int IW = $clog2(NR + 1);
  logic          busy, pass2;
  logic [IW-1:0] idx;
  fp_t           m_e;
  fp_t           row [Z];

  always_comb begin
    fp_t acc;
    int c;
    acc = FP_ZERO;
    for (int j = 0; j < Z; j++) acc = fp_add(acc, fp_abs(vala[idx][j]));
    m_e = fp_is_zero(acc) ? FP_ONE : fp_div(FP_ONE, fp_sqrt(acc));
    for (int j = 0; j < Z; j++) begin
      c = int'(col_ind[idx]) + j;
      row[j] = (c < NR) ? fp_mul(fp_mul(vala[idx][j], mdiag[idx]), mdiag[c]) : FP_ZERO;
    end
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy  <= 1'b0;
      pass2 <= 1'b0;
      idx   <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      pass2 <= 1'b0;
      idx   <= '0;
    end else if (busy) begin
      idx <= idx + 1'b1;
      if (!pass2) begin
        mdiag[idx] <= m_e;
        if (int'(idx) == NR - 1) begin
          pass2 <= 1'b1;
          idx   <= '0;
        end
      end else begin
        atil[idx] <= row;
        btil[idx] <= fp_mul(mdiag[idx], bip[idx]);
        if (int'(idx) == NR - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
