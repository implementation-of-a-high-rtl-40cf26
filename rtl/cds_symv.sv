// cds_symv: y = Q*x for a symmetric matrix Q held in compressed diagonal
// storage (CDS). Column j of val holds the diagonal at offset col_ind[j]
// (offset 0 is the main diagonal) of the upper triangle; the lower triangle
// is read by symmetry, as in the CDS matrix-vector algorithm of the design.
// One output element is produced per clock cycle, with all NDIAG upper and
// NDIAG-1 mirrored products of that element formed in parallel (the inner
// loop unrolled, the outer loop pipelined at one element per cycle).
// Timing: start (one-cycle pulse) -> NV cycles -> done (one-cycle pulse);
// inputs must be held stable from start to done.
// Default NDIAG = 1 (diagonal weights, the case used by the solver); larger
// NDIAG gives the general banded form.
// Compressed diagonal storage for Q follows the original HLS solver; the
// element-serial schedule is this design's choice.
module cds_symv import mpc_pkg::*; #(
  parameter int NV    = 25,
  parameter int NDIAG = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  fp_t         val     [NV][NDIAG],
  input  logic [15:0] col_ind [NDIAG],
  input  fp_t         vect    [NV],
  output fp_t         out     [NV],
  output logic        done
);
  localparam int IW = $clog2(NV + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           elem;

  always_comb begin
    int i, c;
    i = int'(idx);
    elem = FP_ZERO;
    for (int j = 0; j < NDIAG; j++) begin
      c = int'(col_ind[j]);
      if (i + c < NV) elem = fp_add(elem, fp_mul(val[i][j], vect[i + c]));
      if (c > 0 && i - c >= 0) elem = fp_add(elem, fp_mul(val[i - c][j], vect[i - c]));
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
      if (int'(idx) == NV - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
