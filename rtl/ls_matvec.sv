// ls_matvec: out = A*vect for a banded matrix in left-shift storage: row i
// of A has its non-zeros in val[i][0..Z-1], starting at column col_ind[i].
// Columns past the end of the vector read as zero, so the vector needs no
// explicit padding. One row per cycle: the Z products of a row are formed in
// parallel and summed by a chain of adders (the inner loop fully unrolled,
// the row loop pipelined at one row per cycle).
// Timing: start pulse, NR cycles, done pulse; inputs held stable while busy.
// Left-shift storage follows the original HLS solver; reading out-of-range
// columns as zero instead of storing padding is this design's choice.
module ls_matvec import mpc_pkg::*; #(
  parameter int NR = 40,
  parameter int Z  = 11
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  fp_t         val     [NR][Z],
  input  logic [15:0] col_ind [NR],
  input  fp_t         vect    [NR],
  output fp_t         out     [NR],
  output logic        done
);
  localparam int IW = $clog2(NR + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           elem;

  always_comb begin
    int c;
    elem = FP_ZERO;
    for (int j = 0; j < Z; j++) begin
      c = int'(col_ind[idx]) + j;
      if (c < NR) elem = fp_add(elem, fp_mul(val[idx][j], vect[c]));
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
      if (int'(idx) == NR - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
