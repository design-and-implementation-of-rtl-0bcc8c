// fir2d_broadcast: 3x3 2-D FIR filter with data broadcast.
//
// The image arrives in raster order, one 8-bit pixel x(n1,n2) per clock,
// lines of LINE_LEN pixels back to back. Two cascaded line delays provide
// x(n1,n2-1) and x(n1,n2-2). Each line is broadcast, undelayed, to the three
// constant multipliers of a transposed 3-tap row (see fir1d_broadcast),
// whose delays hold partial sums instead of pixels. In row r the product
// with a(0,r) is the one that passes through both partial-sum registers,
// so it weights x(n1-2); a(1,r) weights x(n1-1) and a(2,r) weights x(n1):
//   youtfn(t+3) = sum_{i,j} a(i,j) * x(n1-2+i, n2-j)
// for the pixel x(n1,n2) presented at clock t. The published kernel is
// symmetric in i, so both structures give identical outputs with the
// default coefficients; they differ only for a non-symmetric kernel.
// The kernel is unscaled: divide youtfn by 16 for unity gain.
//
// Pixels outside the image are whatever the line delays hold: zeros after a
// reset, otherwise the pixels of the neighbouring line.
//
// Structure, coefficient placement and output names follow the published
// data-broadcast 2-D filter; LINE_LEN, the alignment register in the output
// stage and the synchronous zero reset are this design's choices.
module fir2d_broadcast
  import fir2d_pkg::*;
#(
  parameter int unsigned LINE_LEN = 8,
  parameter coef_mat_t   A        = COEFS
) (
  input  logic       clk,
  input  logic       reset,
  input  data_t      x,
  output fir2d_out_t y
);

  data_t line [TAPS];   // line[r] = x(n1, n2-r)
  acc_t  row  [TAPS];

  assign line[0] = x;

  for (genvar r = 1; r < TAPS; r++) begin : g_ld
    line_delay #(.LINE_LEN(LINE_LEN), .DATA_W(DATA_W)) u_ld (
      .i_clk       (clk),
      .i_sync_reset(reset),
      .i_data      (line[r-1]),
      .o_data      (line[r])
    );
  end

  for (genvar r = 0; r < TAPS; r++) begin : g_row
    fir1d_broadcast #(.H({A[0][r], A[1][r], A[2][r]})) u_row (
      .clk  (clk),
      .reset(reset),
      .x    (line[r]),
      .y    (row[r])
    );
  end

  fir2d_combine u_sum (
    .clk  (clk),
    .reset(reset),
    .row0 (row[0]),
    .row1 (row[1]),
    .row2 (row[2]),
    .q    (y)
  );

endmodule
