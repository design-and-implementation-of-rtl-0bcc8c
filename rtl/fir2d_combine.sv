// fir2d_combine: output adder stage shared by both 2-D FIR structures.
//
// Takes the three combinational row sums of a 3x3 filter and combines them
// in two registered adder levels:
//   cycle 1: yout, yout1, yout2 <= row sums of lines n2, n2-1, n2-2
//   cycle 2: yout3 <= yout + yout1;  yout2_d <= yout2
//   cycle 3: youtfn <= yout3 + yout2_d
// so youtfn is the complete filter output three clocks after the pixel
// that completes its window has been presented. The extra register
// yout2_d keeps row 2 aligned with the other two rows; without it row 2
// would be added one pixel late and the kernel would be skewed.
//
// The register names and the adder tree (two rows first, then the third)
// follow the published schematic; the alignment register is this design's
// own reading of it. All registers reset synchronously to zero.
module fir2d_combine
  import fir2d_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  acc_t       row0,
  input  acc_t       row1,
  input  acc_t       row2,
  output fir2d_out_t q
);

  acc_t yout2_d;

  always_ff @(posedge clk) begin
    if (reset) begin
      q       <= '0;
      yout2_d <= '0;
    end else begin
      q.yout   <= row0;
      q.yout1  <= row1;
      q.yout2  <= row2;
      q.yout3  <= q.yout + q.yout1;
      yout2_d  <= q.yout2;
      q.youtfn <= q.yout3 + yout2_d;
    end
  end

endmodule
