// fir1d_broadcast_tb: self-checking test of the transposed (data broadcast) 3-tap row.
//
// One instance uses the default taps (1 4 1, the middle kernel row), one a
// non-symmetric set (13, 2, 7) so that reversed taps would be caught. The
// row output is combinational on the current pixel, so it is checked right
// after each new pixel is applied, against
//   y(n) = H[0]*x(n) + H[1]*x(n-1) + H[2]*x(n-2)
// with pixels from before a reset taken as zero.
module fir1d_broadcast_tb;
  import fir2d_pkg::*;

  localparam int HMAX = 2048;
  localparam int H_DEF  [3] = '{1, 4, 1};
  localparam int H_ASYM [3] = '{13, 2, 7};

  logic  clk = 1'b0;
  logic  reset;
  data_t x;
  acc_t  y_def, y_asym;

  always #5 clk = ~clk;

  fir1d_broadcast dut_def (.clk, .reset, .x, .y(y_def));
  fir1d_broadcast #(.H({4'd7, 4'd2, 4'd13})) dut_asym (.clk, .reset, .x, .y(y_asym));

  int unsigned checks = 0, failures = 0;
  int          n;
  int          hist [HMAX];

  function automatic int px(int k);
    return (k < 0) ? 0 : hist[k];
  endfunction

  function automatic acc_t model(input int h [3]);
    return acc_t'(h[0]*px(n) + h[1]*px(n-1) + h[2]*px(n-2));
  endfunction

  task automatic chk(string tag, acc_t got, acc_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s n=%0d got %0d exp %0d", tag, n, got, exp);
    end
  endtask

  // Apply pixel n, check the combinational output, then clock it in.
  task automatic step(data_t v);
    x       = v;
    hist[n] = int'(v);
    #1;
    chk("def",  y_def,  model(H_DEF));
    chk("asym", y_asym, model(H_ASYM));
    @(negedge clk);
    n++;
  endtask

  initial begin
    reset = 1'b1; x = '0; n = 0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    step(8'd1);
    repeat (4) step(8'd0);
    for (int c = 0; c < 300; c++) step((c % 50) < 8 ? 8'hFF : data_t'($urandom));
    reset = 1'b1;
    x     = 8'd0;
    @(negedge clk);
    reset = 1'b0;
    n     = 0;
    for (int c = 0; c < 300; c++) step(data_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
