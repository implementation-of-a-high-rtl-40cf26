// b_calc: right-hand side of the equality constraints, b = [A0*x0; 0; ...; 0],
// formed from the measured state x0 and the first model matrix A0 (rows
// 0..n-1 of adn). One element per cycle over all N*n rows; start/done
// pulses; inputs held stable while busy.
// The form of b follows the sparse MPC formulation; computing it in hardware
// and the schedule are this design's choices.
module b_calc import mpc_pkg::*; #(
  parameter int NX = 3,
  parameter int NU = 2,
  parameter int NH = 5,
  localparam int NEC = NH * NX
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fp_t  adn [(NH+1)*NX][NX],
  input  fp_t  x0  [NX],
  output fp_t  b   [NEC],
  output logic done
);
  localparam int IW = $clog2(NEC + 1);
  logic          busy;
  logic [IW-1:0] idx;
  fp_t           elem;

  always_comb begin
    elem = FP_ZERO;
    if (int'(idx) < NX)
      for (int j = 0; j < NX; j++)
        elem = fp_add(elem, fp_mul(adn[int'(idx) % NX][j], x0[j]));
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
      b[idx] <= elem;
      idx    <= idx + 1'b1;
      if (int'(idx) == NEC - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
