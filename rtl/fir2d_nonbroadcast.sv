// fir2d_nonbroadcast: 3x3 2-D FIR filter without data broadcast.
//
// The image arrives in raster order, one 8-bit pixel x(n1,n2) per clock,
// lines of LINE_LEN pixels back to back. Two cascaded line delays provide
// x(n1,n2-1) and x(n1,n2-2). Each of the three lines feeds a direct-form
// 3-tap row (delays on the data, see fir1d_nonbroadcast); row r uses
// coefficients a(0,r), a(1,r), a(2,r) on x(n1), x(n1-1), x(n1-2). The
// three row sums are combined by fir2d_combine, so
//   youtfn(t+3) = sum_{i,j} a(i,j) * x(n1-i, n2-j)
// for the pixel x(n1,n2) presented at clock t. The kernel is unscaled:
// youtfn carries COEF_FRAC fractional bits (divide by 16 for unity gain).
//
// Pixels outside the image are whatever the line delays hold: zeros after a
// reset, otherwise the pixels of the neighbouring line, as in any plain
// line-buffer filter without border handling.
//
// Structure, coefficient placement and output names follow the published
// non-broadcast 2-D filter; LINE_LEN, the alignment register in the output
// stage and the synchronous zero reset are this design's choices.
module fir2d_nonbroadcast
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
    fir1d_nonbroadcast #(.H({A[2][r], A[1][r], A[0][r]})) u_row (
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
