// ct_mult: out = C^T * w for the box-constraint matrix C described only by
// the constrained-state mask cp. For input u_k[j] the element is
// w[upper] - w[lower]; for state x_(k+1)[j] it is the same when cp[j] is set
// and zero otherwise. Row indices follow the per-stage layout
// [u upper, u lower, x upper, x lower]. One element per cycle; start/done
// pulses; inputs held stable while busy.
// Replacing C by the mask cp follows the original HLS solver; the w_up -
// w_lo form and the schedule are this design's choices.
module ct_mult import mpc_pkg::*; #(
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
  input  fp_t           w   [NIC],
  output fp_t           out [NOV],
  output logic          done
);
  localparam int IW = $clog2(NOV + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           elem;

  always_comb begin
    int r;
    r = int'(idx) % (NX + NU);
    if (r < NU || cp[(r < NU) ? 0 : r - NU])
      elem = fp_sub(w[ic_up(NX, NU, int'(idx))], w[ic_lo(NX, NU, int'(idx))]);
    else
      elem = FP_ZERO;
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
