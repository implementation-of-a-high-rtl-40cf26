// step_length: common step length of the interior-point update,
//   alpha = min(1, min over rows with dz < 0 of -beta*z/dz) for z in {v, s},
// which keeps the multipliers v and slacks s strictly positive. One row
// (both v and s) is examined per cycle and the running minimum is kept in
// a register. Timing: start pulse, NIC cycles, done pulse with alpha valid
// (alpha holds its value until the next start). beta is in (0,1).
// The ratio test follows the original HLS solver; the serial running minimum
// is this design's choice.
module step_length import mpc_pkg::*; #(
  parameter int NIC = 50
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fp_t  beta,
  input  fp_t  v  [NIC],
  input  fp_t  dv [NIC],
  input  fp_t  s  [NIC],
  input  fp_t  ds [NIC],
  output fp_t  alpha,
  output logic done
);
  localparam int IW = $clog2(NIC + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           cand;

  always_comb begin
    fp_t c;
    c = FP_ONE;
    cand = alpha;
    if (fp_is_neg(dv[idx])) begin
      c = fp_neg(fp_div(fp_mul(beta, v[idx]), dv[idx]));
      if (fp_lt(c, cand)) cand = c;
    end
    if (fp_is_neg(ds[idx])) begin
      c = fp_neg(fp_div(fp_mul(beta, s[idx]), ds[idx]));
      if (fp_lt(c, cand)) cand = c;
    end
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy  <= 1'b0;
      idx   <= '0;
      alpha <= FP_ONE;
    end else if (start) begin
      busy  <= 1'b1;
      idx   <= '0;
      alpha <= FP_ONE;
    end else if (busy) begin
      alpha <= cand;
      idx   <= idx + 1'b1;
      if (int'(idx) == NIC - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
