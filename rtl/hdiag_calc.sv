// hdiag_calc: diagonal of H = Q + C^T S^-1 V C, the (1,1) block of the
// reduced primal-dual matrix. Because C holds only box constraints, this
// term is diagonal: for every bounded variable i it adds v/s of its upper
// and of its lower bound row to the weight qdiag[i]; for an unbounded state
// (cp bit clear) H_ii equals qdiag[i]. One element per cycle (two dividers);
// start/done pulses; inputs held stable while busy.
// Computing only the diagonal of H follows the original HLS solver; the
// schedule is this design's choice.
module hdiag_calc import mpc_pkg::*; #(
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
  input  fp_t           qdiag [NOV],
  input  fp_t           v     [NIC],
  input  fp_t           s     [NIC],
  output fp_t           hdiag [NOV],
  output logic          done
);
  localparam int IW = $clog2(NOV + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           elem;

  always_comb begin
    int r, up, lo;
    r  = int'(idx) % (NX + NU);
    up = ic_up(NX, NU, int'(idx));
    lo = ic_lo(NX, NU, int'(idx));
    elem = qdiag[idx];
    if (r < NU || cp[(r < NU) ? 0 : r - NU])
      elem = fp_add(elem, fp_add(fp_div(v[up], s[up]), fp_div(v[lo], s[lo])));
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
      hdiag[idx] <= elem;
      idx        <= idx + 1'b1;
      if (int'(idx) == NOV - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
