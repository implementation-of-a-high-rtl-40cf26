// minres: minimum-residual (MINRES) solver for a symmetric, possibly
// indefinite system A*x = b with A in left-shift banded storage. It runs a
// fixed number of iterations (ITERS, by default the order of the system, so
// the run time is deterministic) from the initial guess x0.
// Each iteration is one Lanczos step (one matrix-vector product on the
// shared ls_matvec unit, a dot product and a three-term vector update), a
// QR update of the tridiagonal Lanczos matrix by a Givens rotation, and the
// solution update through the three-term recurrence of the search vectors
// omega. Vector passes handle one element per cycle; the scalar recurrence
// (two square roots and the rotation) takes a few cycles between passes.
// Breakdown guard: when the new Lanczos vector has zero norm the solver
// keeps the current x (scaling by 1/beta is replaced by zero).
// Timing: start pulse -> about ITERS*(5*NR + 9) + 2*NR cycles -> done
// pulse with x valid (held until the next start). Inputs held while busy.
// The MINRES recurrences and the fixed iteration count follow the original
// HLS solver; the breakdown guard and the single shared matrix-vector unit
// are this design's choices.
module minres import mpc_pkg::*; #(
  parameter int NR    = 40,
  parameter int Z     = 11,
  parameter int ITERS = 40
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  fp_t         aval    [NR][Z],
  input  logic [15:0] col_ind [NR],
  input  fp_t         b       [NR],
  input  fp_t         x0      [NR],
  output fp_t         x       [NR],
  output logic        done
);
  typedef enum logic [3:0] {
    S_IDLE, S_MV0, S_INIT, S_BETA0, S_INV, S_SCALE, S_MV, S_DOT, S_VHAT,
    S_SC1, S_SC2, S_SC3, S_SC4, S_UPD, S_ETA
  } state_t;

  localparam int IW = $clog2(NR + 1);
  localparam int NW = $clog2(ITERS + 1);

  state_t        st;
  logic [IW-1:0] i;
  logic [NW-1:0] n;
  fp_t v [NR], vprev [NR], vhat [NR], w0 [NR], w1 [NR], mv [NR];
  fp_t acc, alpha, beta, beta_p, invb, eta, gam, gam1, gam2, sig, sig1, sig2;
  fp_t r1h, r1, r2, r3, inv_r1, coef;
  logic mv_start, mv_done, mv_on_x;
  fp_t mv_vec [NR];

  always_comb
    for (int k = 0; k < NR; k++) mv_vec[k] = mv_on_x ? x[k] : v[k];

  ls_matvec #(.NR(NR), .Z(Z)) u_mv (
    .clk, .rst, .start(mv_start), .val(aval), .col_ind, .vect(mv_vec), .out(mv), .done(mv_done)
  );

  // per-element datapath values
  fp_t e_vhat0, e_vhat, e_v, e_w;
  always_comb begin
    e_vhat0 = fp_sub(b[i], mv[i]);
    e_v     = fp_mul(vhat[i], invb);
    e_vhat  = fp_sub(fp_sub(mv[i], fp_mul(alpha, v[i])), fp_mul(beta, vprev[i]));
    e_w     = fp_mul(fp_sub(fp_sub(v[i], fp_mul(r3, w1[i])), fp_mul(r2, w0[i])), inv_r1);
  end

  wire last = (int'(i) == NR - 1);

  always_ff @(posedge clk) begin
    mv_start <= 1'b0;
    done     <= 1'b0;
    if (rst) begin
      st      <= S_IDLE;
      i       <= '0;
      n       <= '0;
      mv_on_x <= 1'b0;
    end else begin
      case (st)
        S_IDLE:
          if (start) begin
            x        <= x0;
            mv_on_x  <= 1'b1;
            mv_start <= 1'b1;
            st       <= S_MV0;
          end
        S_MV0:
          if (mv_done) begin
            i   <= '0;
            acc <= FP_ZERO;
            st  <= S_INIT;
          end
        S_INIT: begin
          // vhat = b - A*x0, ||vhat||^2, clear the recurrence vectors
          vhat[i] <= e_vhat0;
          v[i]    <= FP_ZERO;
          w0[i]   <= FP_ZERO;
          w1[i]   <= FP_ZERO;
          acc     <= fp_add(acc, fp_mul(e_vhat0, e_vhat0));
          i       <= i + 1'b1;
          if (last) st <= S_BETA0;
        end
        S_BETA0: begin
          beta <= fp_sqrt(acc);
          eta  <= fp_sqrt(acc);
          gam  <= FP_ONE;
          gam1 <= FP_ONE;
          sig  <= FP_ZERO;
          sig1 <= FP_ZERO;
          n    <= '0;
          st   <= S_INV;
        end
        S_INV: begin
          invb <= fp_is_zero(beta) ? FP_ZERO : fp_div(FP_ONE, beta);
          i    <= '0;
          st   <= S_SCALE;
        end
        S_SCALE: begin
          // Lanczos: v(k-1) <- v(k), v(k) <- vhat / beta
          vprev[i] <= v[i];
          v[i]     <= e_v;
          i        <= i + 1'b1;
          if (last) begin
            mv_on_x  <= 1'b0;
            mv_start <= 1'b1;
            st       <= S_MV;
          end
        end
        S_MV:
          if (mv_done) begin
            i   <= '0;
            acc <= FP_ZERO;
            st  <= S_DOT;
          end
        S_DOT: begin
          // alpha = v' A v
          acc <= fp_add(acc, fp_mul(v[i], mv[i]));
          i   <= i + 1'b1;
          if (last) begin
            alpha <= fp_add(acc, fp_mul(v[i], mv[i]));
            acc   <= FP_ZERO;
            i     <= '0;
            st    <= S_VHAT;
          end
        end
        S_VHAT: begin
          // vhat = A v - alpha v - beta v(k-1)
          vhat[i] <= e_vhat;
          acc     <= fp_add(acc, fp_mul(e_vhat, e_vhat));
          i       <= i + 1'b1;
          if (last) st <= S_SC1;
        end
        S_SC1: begin
          beta_p <= beta;
          beta   <= fp_sqrt(acc);
          gam2   <= gam1;
          gam1   <= gam;
          sig2   <= sig1;
          sig1   <= sig;
          st     <= S_SC2;
        end
        S_SC2: begin
          // QR factorisation of the Lanczos tridiagonal matrix
          r1h <= fp_sub(fp_mul(gam1, alpha), fp_mul(fp_mul(gam2, sig1), beta_p));
          r2  <= fp_add(fp_mul(sig1, alpha), fp_mul(fp_mul(gam2, gam1), beta_p));
          r3  <= fp_mul(sig2, beta_p);
          st  <= S_SC3;
        end
        S_SC3: begin
          r1 <= fp_sqrt(fp_add(fp_mul(r1h, r1h), fp_mul(beta, beta)));
          st <= S_SC4;
        end
        S_SC4: begin
          // Givens rotation
          if (fp_is_zero(r1)) begin
            gam    <= FP_ONE;
            sig    <= FP_ZERO;
            inv_r1 <= FP_ZERO;
            coef   <= FP_ZERO;
          end else begin
            gam    <= fp_div(r1h, r1);
            sig    <= fp_div(beta, r1);
            inv_r1 <= fp_div(FP_ONE, r1);
            coef   <= fp_mul(fp_div(r1h, r1), eta);
          end
          i  <= '0;
          st <= S_UPD;
        end
        S_UPD: begin
          // omega(k) = (v - r3 omega(k-2) - r2 omega(k-1)) / r1; x += gamma*eta*omega(k)
          w1[i] <= w0[i];
          w0[i] <= e_w;
          x[i]  <= fp_add(x[i], fp_mul(coef, e_w));
          i     <= i + 1'b1;
          if (last) st <= S_ETA;
        end
        S_ETA: begin
          eta <= fp_neg(fp_mul(sig, eta));
          n   <= n + 1'b1;
          if (int'(n) == ITERS - 1) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            st <= S_INV;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
