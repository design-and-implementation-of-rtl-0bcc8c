// fir1d_nonbroadcast: 3-tap direct-form FIR row ("non-broadcast" structure).
//
// Computes y(n) = H[0]*x(n) + H[1]*x(n-1) + H[2]*x(n-2). The input runs
// through a chain of two delay registers; each of the three taps x(n),
// x(n-1), x(n-2) feeds its own constant multiplier, and the three products
// are summed by an adder chain. The adder chain is combinational, so y is
// valid in the same cycle as x: the caller registers it.
//
// Interface: one 8-bit unsigned sample per clock on x, 16-bit unsigned sum
// on y. Coefficients are the parameter H (element k weights x(n-k)); they
// are constants, so each multiplier reduces to shifts and adds. A
// synchronous, active-high reset clears the two delay registers.
//
// The structure follows the published direct-form row (delays on the data,
// adders after the multipliers). Widths: 12-bit products and 16-bit sums as
// published; unsigned arithmetic is this design's choice.
module fir1d_nonbroadcast
  import fir2d_pkg::*;
#(
  parameter coef_row_t H = {COEFS[2][1], COEFS[1][1], COEFS[0][1]}
) (
  input  logic  clk,
  input  logic  reset,
  input  data_t x,
  output acc_t  y
);

  data_t x_d1, x_d2;     // x(n-1), x(n-2)
  prod_t p0, p1, p2;

  always_ff @(posedge clk) begin
    if (reset) begin
      x_d1 <= '0;
      x_d2 <= '0;
    end else begin
      x_d1 <= x;
      x_d2 <= x_d1;
    end
  end

  always_comb begin
    p0 = prod_t'(x)    * prod_t'(H[0]);
    p1 = prod_t'(x_d1) * prod_t'(H[1]);
    p2 = prod_t'(x_d2) * prod_t'(H[2]);
    y  = acc_t'(p0) + acc_t'(p1) + acc_t'(p2);
  end

endmodule
