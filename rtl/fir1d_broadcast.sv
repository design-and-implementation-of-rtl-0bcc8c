// fir1d_broadcast: 3-tap transposed FIR row ("data broadcast" structure).
//
// Computes the same y(n) = H[0]*x(n) + H[1]*x(n-1) + H[2]*x(n-2) as the
// direct form, but the input sample is broadcast to all three constant
// multipliers at once and the delays sit in the partial-sum path:
//     s2 <= H[2]*x
//     s1 <= s2 + H[1]*x
//     y   = s1 + H[0]*x
// No register holds raw samples. The last adder is combinational, so y is
// valid in the same cycle as x: the caller registers it.
//
// Interface: one 8-bit unsigned sample per clock on x, 16-bit unsigned sum
// on y. H is a parameter (element k weights x(n-k)). A synchronous,
// active-high reset clears both partial-sum registers.
//
// The structure follows the published transposed row; the 16-bit partial
// sum registers match the published 16-bit delay elements. Unsigned
// arithmetic is this design's choice.
module fir1d_broadcast
  import fir2d_pkg::*;
#(
  parameter coef_row_t H = {COEFS[2][1], COEFS[1][1], COEFS[0][1]}
) (
  input  logic  clk,
  input  logic  reset,
  input  data_t x,
  output acc_t  y
);

  prod_t p0, p1, p2;
  acc_t  s1, s2;         // partial sums, one and two cycles old

  always_comb begin
    p0 = prod_t'(x) * prod_t'(H[0]);
    p1 = prod_t'(x) * prod_t'(H[1]);
    p2 = prod_t'(x) * prod_t'(H[2]);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s2 <= acc_t'(p2);
      s1 <= s2 + acc_t'(p1);
    end
  end

  assign y = s1 + acc_t'(p0);

endmodule
