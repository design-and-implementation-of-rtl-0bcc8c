// fir2d_top_tb: end-to-end test of both 2-D filter structures at their
// default size (8-pixel lines, published kernel).
//
// Each frame is an 8x8 image streamed in raster order after a reset, so
// the line delays start empty (a zero border above the image), followed by
// three flush pixels so that the last window reaches youtfn. Every output
// of both filters is compared each clock with a model of the filter
// equation using the kernel worked out by hand from the prototype taps,
//   a = [1 1 1; 3 4 3; 1 1 1]  (a(i,j): i along a line, j across lines).
// Frames: a single impulse (maps the kernel and the 3-clock latency), a
// full-scale image (largest output, 255*16), a ramp, random images with the
// same pixels on both filters (their outputs must agree), and random images
// with different pixels on each input (the two filters are independent).
// Counted events, each of which must occur: a window that spans three
// lines, the full-scale output, a reset between frames, agreement of the two
// structures, and a reset in the middle of a frame.
module fir2d_top_tb;
  import fir2d_pkg::*;

  localparam int L    = 8;      // default line length of fir2d_top
  localparam int ROWS = 8;      // lines per test image
  localparam int HMAX = 256;
  localparam int K [3][3] = '{'{1, 1, 1}, '{3, 4, 3}, '{1, 1, 1}};

  logic       clk = 1'b0;
  logic       reset;
  data_t      x_nb, x_bc;
  fir2d_out_t y_nb, y_bc;

  always #5 clk = ~clk;

  fir2d_top dut (.clk, .reset, .x_nb, .y_nb, .x_bc, .y_bc);

  int unsigned checks = 0, failures = 0;
  int unsigned ev_three_lines = 0, ev_full_scale = 0, ev_frame_reset = 0;
  int unsigned ev_agree = 0, ev_mid_reset = 0;
  int          n;
  bit          shared;        // both filters see the same frame
  int          h_nb [HMAX];
  int          h_bc [HMAX];

  function automatic int px(bit bc, int k);
    if (k < 0) return 0;
    return bc ? h_bc[k] : h_nb[k];
  endfunction

  function automatic int row(bit bc, int r, int t);
    int s = 0;
    if (t < 0) return 0;
    for (int i = 0; i < 3; i++)
      s += (bc ? K[2-i][r] : K[i][r]) * px(bc, t - r*L - i);
    return s;
  endfunction

  function automatic fir2d_out_t model(bit bc);
    fir2d_out_t e;
    e.yout   = acc_t'(row(bc, 0, n-1));
    e.yout1  = acc_t'(row(bc, 1, n-1));
    e.yout2  = acc_t'(row(bc, 2, n-1));
    e.yout3  = acc_t'(row(bc, 0, n-2) + row(bc, 1, n-2));
    e.youtfn = acc_t'(row(bc, 0, n-3) + row(bc, 1, n-3) + row(bc, 2, n-3));
    return e;
  endfunction

  task automatic compare(string tag, fir2d_out_t got, fir2d_out_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s n=%0d got %0d %0d %0d %0d %0d exp %0d %0d %0d %0d %0d", tag, n,
                 got.yout, got.yout1, got.yout2, got.yout3, got.youtfn,
                 exp.yout, exp.yout1, exp.yout2, exp.yout3, exp.youtfn);
    end
  endtask

  task automatic step(data_t a, data_t b);
    x_nb    = a;
    x_bc    = b;
    h_nb[n] = int'(a);
    h_bc[n] = int'(b);
    @(negedge clk);
    n++;
    compare("nb", y_nb, model(1'b0));
    compare("bc", y_bc, model(1'b1));
    if (y_nb.yout2 != 0 && y_nb.yout != 0) ev_three_lines++;
    if (y_nb.youtfn == acc_t'(255 * 16)) ev_full_scale++;
    if (shared && y_nb.youtfn != 0) begin
      checks++;
      if (y_nb != y_bc) begin
        failures++;
        $display("FAIL structures disagree at n=%0d", n);
      end else ev_agree++;
    end
  endtask

  task automatic do_reset();
    reset = 1'b1;
    x_nb  = '0;
    x_bc  = '0;
    @(negedge clk);
    compare("rst_nb", y_nb, '0);
    compare("rst_bc", y_bc, '0);
    reset = 1'b0;
    n     = 0;
  endtask

  // kind: 0 impulse, 1 full scale, 2 ramp, 3 random shared, 4 random separate
  task automatic frame(int kind, int stop_after = -1);
    data_t a, b;
    do_reset();
    ev_frame_reset++;
    shared = (kind != 4);
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < L; c++) begin
        if (stop_after >= 0 && r*L + c == stop_after) return;
        case (kind)
          0:       a = (r == 0 && c == 0) ? 8'd1 : 8'd0;
          1:       a = 8'hFF;
          2:       a = data_t'(16*r + 4*c);
          default: a = data_t'($urandom);
        endcase
        b = (kind == 4) ? data_t'($urandom) : a;
        step(a, b);
      end
    end
    repeat (3) step(8'd0, 8'd0);
  endtask

  initial begin
    n = 0;
    reset = 1'b1; x_nb = '0; x_bc = '0;
    repeat (2) @(negedge clk);
    frame(0);
    frame(1);
    frame(2);
    repeat (4) frame(3);
    frame(3, 29);              // cut short by the next frame's reset
    ev_mid_reset++;
    repeat (4) frame(4);
    frame(1);

    if (ev_three_lines == 0) begin failures++; $display("FAIL no window spanning three lines"); end
    if (ev_full_scale  == 0) begin failures++; $display("FAIL full-scale output never seen"); end
    if (ev_frame_reset == 0) begin failures++; $display("FAIL no reset between frames"); end
    if (ev_agree       == 0) begin failures++; $display("FAIL structures never compared"); end
    if (ev_mid_reset   == 0) begin failures++; $display("FAIL no mid-frame reset"); end
    $display("events: three_lines=%0d full_scale=%0d frame_reset=%0d agree=%0d mid_reset=%0d",
             ev_three_lines, ev_full_scale, ev_frame_reset, ev_agree, ev_mid_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
