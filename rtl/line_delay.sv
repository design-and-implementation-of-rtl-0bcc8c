// line_delay: one image line of delay for the 2-D FIR filter.
//
// Turns the raster-order pixel stream x(n1,n2) into x(n1,n2-1), the pixel
// in the same column of the previous line. It is a LINE_LEN-stage shift
// register that advances every clock, so o_data equals i_data from exactly
// LINE_LEN clocks earlier. A synchronous, active-high i_sync_reset clears
// every stage to zero; until LINE_LEN samples have entered after a reset
// the output is therefore zero, which acts as a zero border above the
// first line.
//
// The block's role, its port names and the 8-bit width follow the published
// design; the line length (image width) is not published, so LINE_LEN
// defaults to 8 here and is normally set to the width of the image.
module line_delay #(
  parameter int unsigned LINE_LEN = 8,
  parameter int unsigned DATA_W   = fir2d_pkg::DATA_W
) (
  input  logic              i_clk,
  input  logic              i_sync_reset,
  input  logic [DATA_W-1:0] i_data,
  output logic [DATA_W-1:0] o_data
);

  logic [DATA_W-1:0] stage [LINE_LEN];

  always_ff @(posedge i_clk) begin
    if (i_sync_reset) begin
      for (int i = 0; i < LINE_LEN; i++) stage[i] <= '0;
    end else begin
      stage[0] <= i_data;
      for (int i = 1; i < LINE_LEN; i++) stage[i] <= stage[i-1];
    end
  end

  assign o_data = stage[LINE_LEN-1];

  initial assert (LINE_LEN >= 1) else $error("line_delay: LINE_LEN must be at least 1");

endmodule
