// fir2d_top: the two proposed 3x3 2-D FIR filter structures side by side.
//
// Both filters implement the same separable low-pass kernel (fir2d_pkg) on
// an 8-bit raster-order pixel stream, one pixel per clock:
//   - fir2d_nonbroadcast: direct-form rows, delay registers on the pixels;
//   - fir2d_broadcast:    transposed rows, each pixel broadcast to all three
//                         multipliers of its row, delays on the partial sums.
// They are independent alternatives, so each has its own pixel input and
// its own output bundle; only clock and the synchronous active-high reset
// are shared. Each output bundle carries the three registered row sums
// (yout, yout1, yout2), the partial sum yout3 = yout + yout1 and the filter
// output youtfn, which is valid three clocks after the pixel that completes
// its 3x3 window. With the default (symmetric) kernel both structures give
// identical outputs for identical inputs.
//
// LINE_LEN is the number of pixels per image line; it is not published and
// defaults to 8.
module fir2d_top
  import fir2d_pkg::*;
#(
  parameter int unsigned LINE_LEN = 8
) (
  input  logic       clk,
  input  logic       reset,
  input  data_t      x_nb,   // pixel into the non-broadcast filter
  output fir2d_out_t y_nb,
  input  data_t      x_bc,   // pixel into the data-broadcast filter
  output fir2d_out_t y_bc
);

  fir2d_nonbroadcast #(.LINE_LEN(LINE_LEN)) u_nb (
    .clk  (clk),
    .reset(reset),
    .x    (x_nb),
    .y    (y_nb)
  );

  fir2d_broadcast #(.LINE_LEN(LINE_LEN)) u_bc (
    .clk  (clk),
    .reset(reset),
    .x    (x_bc),
    .y    (y_bc)
  );

endmodule
