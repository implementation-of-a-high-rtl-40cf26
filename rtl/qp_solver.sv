// qp_solver: stream-fed hardware accelerator that solves, once per control
// period, the quadratic program of a linear MPC controller with a linear
// time-varying prediction model and box constraints on inputs and states.
//
// Operation (one solve per ap_start pulse):
//   1. RECV  reads (N+1)n*n words of A_dN (row-major, A_0 first), then
//            (N+1)n*m words of B_dN, then the 2N(n+m) bound words d, then
//            the n words of the measured state x0 from the input stream
//            (32-bit binary32 words, AXI4-Stream valid/ready handshake;
//            tlast is not required).
//   2. B     forms b = [A_0 x0; 0 ...].
//   3. IPM   runs ip_algorithm (fixed iteration count).
//   4. SEND  writes the N(n+m) words of xi = [u0 x1 u1 ... u(N-1) xN] to the
//            output stream, tlast on the last word; the first m words are
//            the control inputs to apply.
//   ap_done pulses after the last output word is accepted; ap_idle is high
//   while waiting for ap_start.
// The cost weights and the constrained-state mask are fixed at build time
// (ROM parameters): diagonal weights R (inputs), Q (states, stages 1..N-1),
// P (final state), the linear cost term QLIN and the mask CP (bit j set when
// state j has bounds). Defaults are the three-state vehicle tracking case:
// n = 3, m = 2, N = 5, Q = diag(10,10,0.5), R = I, P = 20Q, state 2
// (heading) bounded, 12 interior-point and 40 MINRES iterations.
// The stream-in/solve/stream-out structure, the build-time weights and the
// mask follow the original HLS solver; the word order of the streams and the
// plain ap_start/ap_done/ap_idle control (in place of a generated AXI4-Lite
// register block) are this design's choices.
module qp_solver import mpc_pkg::*; #(
  parameter int            NX           = 3,
  parameter int            NU           = 2,
  parameter int            NH           = 5,
  parameter int            IPM_ITERS    = 12,
  parameter int            MINRES_ITERS = NH * (2 * NX + NU),
  parameter fp_t           R_W  [NU]    = '{32'h3f80_0000, 32'h3f80_0000},
  parameter fp_t           Q_W  [NX]    = '{32'h4120_0000, 32'h4120_0000, 32'h3f00_0000},
  parameter fp_t           P_W  [NX]    = '{32'h4348_0000, 32'h4348_0000, 32'h4120_0000},
  parameter fp_t           QLIN [NH*(NX+NU)] = '{default: 32'h0},
  parameter logic [NX-1:0] CP           = 3'b100,
  localparam int NOV = NH * (NX + NU),
  localparam int NEC = NH * NX,
  localparam int NIC = 2 * NH * (NX + NU)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ap_start,
  output logic        ap_done,
  output logic        ap_idle,
  // IN_STREAM
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tlast,
  // OUT_STREAM
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast
);
  localparam int NA    = (NH + 1) * NX * NX;
  localparam int NB    = (NH + 1) * NX * NU;
  localparam int NWORD = NA + NB + NIC + NX;
  localparam int CW    = $clog2(NWORD + 1);

  typedef enum logic [2:0] {Q_IDLE, Q_RECV, Q_B, Q_IPM, Q_SEND} qstate_t;

  qstate_t       st;
  logic [CW-1:0] cnt;
  logic          go;
  fp_t adn [(NH+1)*NX][NX];
  fp_t bdn [(NH+1)*NX][NU];
  fp_t d [NIC], x0 [NX], b [NEC], xi [NOV];
  fp_t qdiag [NOV], q [NOV];
  logic b_done, ipm_done, step_valid;
  fp_t step_alpha;

  // weight ROM: Q = blockdiag(R, Q, R, Q, ..., R, P)
  always_comb begin
    for (int k = 0; k < NH; k++) begin
      for (int j = 0; j < NU; j++) qdiag[xi_u(NX, NU, k, j)] = R_W[j];
      for (int j = 0; j < NX; j++) qdiag[xi_x(NX, NU, k, j)] = (k == NH - 1) ? P_W[j] : Q_W[j];
    end
    for (int k = 0; k < NOV; k++) q[k] = QLIN[k];
  end

  b_calc #(.NX(NX), .NU(NU), .NH(NH)) u_b (
    .clk, .rst, .start(go && st == Q_B), .adn, .x0, .b, .done(b_done));

  ip_algorithm #(.NX(NX), .NU(NU), .NH(NH), .IPM_ITERS(IPM_ITERS), .MINRES_ITERS(MINRES_ITERS)) u_ipm (
    .clk, .rst, .start(go && st == Q_IPM), .adn, .bdn, .d, .b, .qdiag, .q, .cp(CP), .xi,
    .done(ipm_done), .step_valid, .step_alpha);

  assign ap_idle       = (st == Q_IDLE);
  assign s_axis_tready = (st == Q_RECV);
  assign m_axis_tvalid = (st == Q_SEND);
  assign m_axis_tdata  = xi[cnt[$clog2(NOV)-1:0]];
  assign m_axis_tlast  = (st == Q_SEND) && (int'(cnt) == NOV - 1);

  always_ff @(posedge clk) begin
    go      <= 1'b0;
    ap_done <= 1'b0;
    if (rst) begin
      st  <= Q_IDLE;
      cnt <= '0;
    end else begin
      case (st)
        Q_IDLE:
          if (ap_start) begin
            cnt <= '0;
            st  <= Q_RECV;
          end
        Q_RECV:
          if (s_axis_tvalid) begin
            if (int'(cnt) < NA)
              adn[int'(cnt) / NX][int'(cnt) % NX] <= s_axis_tdata;
            else if (int'(cnt) < NA + NB)
              bdn[(int'(cnt) - NA) / NU][(int'(cnt) - NA) % NU] <= s_axis_tdata;
            else if (int'(cnt) < NA + NB + NIC)
              d[int'(cnt) - NA - NB] <= s_axis_tdata;
            else
              x0[int'(cnt) - NA - NB - NIC] <= s_axis_tdata;
            cnt <= cnt + 1'b1;
            if (int'(cnt) == NWORD - 1) begin
              go <= 1'b1;
              st <= Q_B;
            end
          end
        Q_B:
          if (b_done) begin
            go <= 1'b1;
            st <= Q_IPM;
          end
        Q_IPM:
          if (ipm_done) begin
            cnt <= '0;
            st  <= Q_SEND;
          end
        Q_SEND:
          if (m_axis_tready) begin
            cnt <= cnt + 1'b1;
            if (int'(cnt) == NOV - 1) begin
              ap_done <= 1'b1;
              st      <= Q_IDLE;
            end
          end
        default: st <= Q_IDLE;
      endcase
    end
  end

  // step_valid/step_alpha and tlast on the input side are observation-only
  wire unused_ok = &{1'b0, step_valid, step_alpha, s_axis_tlast};
endmodule
