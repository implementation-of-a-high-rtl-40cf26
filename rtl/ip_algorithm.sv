// ip_algorithm: primal-dual interior-point method for the MPC quadratic
// program
//   minimise 1/2 xi'Q xi + q'xi  s.t.  A xi = b,  C xi <= d
// with a fixed number of iterations (IPM_ITERS), so that the solve time does
// not depend on the data. Each iteration runs these phases in order, each
// phase handing a start pulse to its unit(s) and waiting for their done:
//   RES   Q xi, A^T lam, C^T v, rp = A xi - b, rc = C xi - d + s (in parallel)
//   RN    rn (reduced dual residual) and the diagonal of H (in parallel)
//   ASM   banded KKT matrix and right-hand side in left-shift storage
//   PRE   diagonal preconditioning M A M, M b
//   MR    MINRES on the preconditioned system, warm-started from the
//         previous iteration's solution
//   REC   d = M y, split into dxi and dlam (undo the interleaving)
//   DVDS  directions dv, ds of multipliers and slacks
//   STEP  common step length alpha (keeps v, s > 0)
//   UPD   xi, lam, v, s += alpha * directions, and v's accumulated
//   MU    mu = v's / N_IC, sigma*mu for the next iteration
// Start values: xi = 0, lam = 0, v = s = 1 (so mu = 1).
// Interface: start pulse with all inputs held stable until done; done pulse
// when xi holds the solution (held until the next start). step_valid pulses
// once per iteration with the step length on step_alpha.
// The method, the phase order and the fixed iteration count follow the
// original HLS solver; sigma = 0.1, beta = 0.95, the start values and the
// MINRES warm start from the previous solution are this design's choices.
module ip_algorithm import mpc_pkg::*; #(
  parameter int  NX           = 3,
  parameter int  NU           = 2,
  parameter int  NH           = 5,
  parameter int  IPM_ITERS    = 12,
  parameter int  MINRES_ITERS = NH * (2 * NX + NU),
  parameter fp_t SIGMA        = 32'h3dcc_cccd,  // 0.1
  parameter fp_t BETA         = 32'h3f73_3333,  // 0.95
  localparam int NOV = NH * (NX + NU),
  localparam int NEC = NH * NX,
  localparam int NIC = 2 * NH * (NX + NU),
  localparam int NR  = NH * (2 * NX + NU),
  localparam int Z   = 3 * NX + NU
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  fp_t           adn   [(NH+1)*NX][NX],
  input  fp_t           bdn   [(NH+1)*NX][NU],
  input  fp_t           d     [NIC],
  input  fp_t           b     [NEC],
  input  fp_t           qdiag [NOV],
  input  fp_t           q     [NOV],
  input  logic [NX-1:0] cp,
  output fp_t           xi    [NOV],
  output logic          done,
  output logic          step_valid,
  output fp_t           step_alpha
);
  typedef enum logic [3:0] {
    P_IDLE, P_RES, P_RN, P_ASM, P_PRE, P_MR, P_REC, P_DVDS, P_STEP, P_UPD, P_MU
  } phase_t;

  localparam int IW = $clog2(NIC + 1);
  localparam int TW = $clog2(IPM_ITERS + 1);

  phase_t        ph;
  logic          go;
  logic [4:0]    got;
  logic [IW-1:0] i;
  // i narrowed to the xi and lambda index widths (used only while i < NOV / NEC)
  logic [$clog2(NOV)-1:0] i_ov;
  logic [$clog2(NEC)-1:0] i_ec;
  assign i_ov = i[$clog2(NOV)-1:0];
  assign i_ec = i[$clog2(NEC)-1:0];
  logic [TW-1:0] it;

  fp_t lam [NEC], v [NIC], s [NIC];
  fp_t sigmu, acc;
  fp_t ypre [NR], dxl [NR];
  fp_t dxi [NOV], dlam [NEC];

  // unit results
  fp_t qx [NOV], atl [NOV], ctv [NOV], rn [NOV], hdiag [NOV];
  fp_t rp [NEC], rc [NIC], dv [NIC], ds [NIC];
  fp_t vala [NR][Z], atil [NR][Z], bip [NR], btil [NR], mdiag [NR], y [NR];
  logic [15:0] col_ind [NR];
  fp_t alpha;
  logic dn_q, dn_at, dn_ct, dn_rp, dn_rc, dn_rn, dn_h, dn_asm, dn_pre, dn_mr, dn_dvds, dn_step;

  fp_t qval [NOV][1];
  logic [15:0] qcol [1];
  always_comb begin
    for (int k = 0; k < NOV; k++) qval[k][0] = qdiag[k];
    qcol[0] = 16'd0;
    // undo the stage interleaving of the primal-dual vector
    for (int k = 0; k < NOV; k++) dxi[k] = dxl[ro_of_xi(NX, NU, k)];
    for (int k = 0; k < NEC; k++) dlam[k] = dxl[ro_of_lam(NX, NU, k)];
  end

  wire go_res = go && ph == P_RES;

  cds_symv #(.NV(NOV), .NDIAG(1)) u_qx (
    .clk, .rst, .start(go_res), .val(qval), .col_ind(qcol), .vect(xi), .out(qx), .done(dn_q));
  at_mult #(.NX(NX), .NU(NU), .NH(NH)) u_at (
    .clk, .rst, .start(go_res), .adn, .bdn, .lam, .out(atl), .done(dn_at));
  ct_mult #(.NX(NX), .NU(NU), .NH(NH)) u_ct (
    .clk, .rst, .start(go_res), .cp, .w(v), .out(ctv), .done(dn_ct));
  rp_calc #(.NX(NX), .NU(NU), .NH(NH)) u_rp (
    .clk, .rst, .start(go_res), .adn, .bdn, .xi, .b, .rp, .done(dn_rp));
  rc_calc #(.NX(NX), .NU(NU), .NH(NH)) u_rc (
    .clk, .rst, .start(go_res), .cp, .xi, .d, .s, .rc, .done(dn_rc));
  rn_calc #(.NX(NX), .NU(NU), .NH(NH)) u_rn (
    .clk, .rst, .start(go && ph == P_RN), .cp, .qx, .q, .atl, .ctv, .v, .s, .rc, .sigmu,
    .rn, .done(dn_rn));
  hdiag_calc #(.NX(NX), .NU(NU), .NH(NH)) u_hd (
    .clk, .rst, .start(go && ph == P_RN), .cp, .qdiag, .v, .s, .hdiag, .done(dn_h));
  kkt_assemble #(.NX(NX), .NU(NU), .NH(NH)) u_asm (
    .clk, .rst, .start(go && ph == P_ASM), .adn, .bdn, .hdiag, .rn, .rp, .vala, .col_ind,
    .bip, .done(dn_asm));
  precond #(.NR(NR), .Z(Z)) u_pre (
    .clk, .rst, .start(go && ph == P_PRE), .vala, .col_ind, .bip, .atil, .btil, .mdiag,
    .done(dn_pre));
  minres #(.NR(NR), .Z(Z), .ITERS(MINRES_ITERS)) u_mr (
    .clk, .rst, .start(go && ph == P_MR), .aval(atil), .col_ind, .b(btil), .x0(ypre), .x(y),
    .done(dn_mr));
  dvds_calc #(.NX(NX), .NU(NU), .NH(NH)) u_dvds (
    .clk, .rst, .start(go && ph == P_DVDS), .cp, .dxi, .rc, .v, .s, .sigmu, .dv, .ds,
    .done(dn_dvds));
  step_length #(.NIC(NIC)) u_step (
    .clk, .rst, .start(go && ph == P_STEP), .beta(BETA), .v, .dv, .s, .ds, .alpha,
    .done(dn_step));

  // element values of the update pass
  fp_t v_new, s_new;
  always_comb begin
    v_new = fp_add(v[i], fp_mul(alpha, dv[i]));
    s_new = fp_add(s[i], fp_mul(alpha, ds[i]));
  end

  wire [4:0] got_res = got | {dn_q, dn_at, dn_ct, dn_rp, dn_rc};
  wire [1:0] got_rn  = got[1:0] | {dn_rn, dn_h};

  always_ff @(posedge clk) begin
    go         <= 1'b0;
    done       <= 1'b0;
    step_valid <= 1'b0;
    if (rst) begin
      ph  <= P_IDLE;
      got <= '0;
      i   <= '0;
      it  <= '0;
    end else begin
      case (ph)
        P_IDLE:
          if (start) begin
            for (int k = 0; k < NOV; k++) xi[k] <= FP_ZERO;
            for (int k = 0; k < NEC; k++) lam[k] <= FP_ZERO;
            for (int k = 0; k < NIC; k++) begin
              v[k] <= FP_ONE;
              s[k] <= FP_ONE;
            end
            for (int k = 0; k < NR; k++) ypre[k] <= FP_ZERO;
            sigmu <= SIGMA;
            it    <= '0;
            got   <= '0;
            go    <= 1'b1;
            ph    <= P_RES;
          end
        P_RES: begin
          got <= got_res;
          if (&got_res) begin
            got <= '0;
            go  <= 1'b1;
            ph  <= P_RN;
          end
        end
        P_RN: begin
          got[1:0] <= got_rn;
          if (&got_rn) begin
            got <= '0;
            go  <= 1'b1;
            ph  <= P_ASM;
          end
        end
        P_ASM:
          if (dn_asm) begin
            go <= 1'b1;
            ph <= P_PRE;
          end
        P_PRE:
          if (dn_pre) begin
            go <= 1'b1;
            ph <= P_MR;
          end
        P_MR:
          if (dn_mr) begin
            i  <= '0;
            ph <= P_REC;
          end
        P_REC: begin
          dxl[i]  <= fp_mul(mdiag[i], y[i]);
          ypre[i] <= y[i];
          i       <= i + 1'b1;
          if (int'(i) == NR - 1) begin
            go <= 1'b1;
            ph <= P_DVDS;
          end
        end
        P_DVDS:
          if (dn_dvds) begin
            go <= 1'b1;
            ph <= P_STEP;
          end
        P_STEP:
          if (dn_step) begin
            step_valid <= 1'b1;
            step_alpha <= alpha;
            i          <= '0;
            acc        <= FP_ZERO;
            ph         <= P_UPD;
          end
        P_UPD: begin
          if (int'(i) < NOV) xi[i_ov] <= fp_add(xi[i_ov], fp_mul(alpha, dxi[i_ov]));
          if (int'(i) < NEC) lam[i_ec] <= fp_add(lam[i_ec], fp_mul(alpha, dlam[i_ec]));
          v[i] <= v_new;
          s[i] <= s_new;
          acc  <= fp_add(acc, fp_mul(v_new, s_new));
          i    <= i + 1'b1;
          if (int'(i) == NIC - 1) ph <= P_MU;
        end
        P_MU: begin
          sigmu <= fp_mul(SIGMA, fp_div(acc, fp_from_int(NIC)));
          it    <= it + 1'b1;
          if (int'(it) == IPM_ITERS - 1) begin
            done <= 1'b1;
            ph   <= P_IDLE;
          end else begin
            go <= 1'b1;
            ph <= P_RES;
          end
        end
        default: ph <= P_IDLE;
      endcase
    end
  end
endmodule
