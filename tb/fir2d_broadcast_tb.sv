// fir2d_broadcast_tb: self-checking test of the data-broadcast 2-D filter.
//
// Two instances run on the same pixel stream: one with the default kernel
// and line length (8), checked against the kernel worked out by hand from
// the prototype taps, and one with a short line (5) and a deliberately
// non-symmetric kernel, which would expose any swapped tap or row. A
// behavioural model keeps every pixel since the last reset and computes
// each registered output from the filter equation, cycle by cycle:
//   row r (newest pixel t) = sum_i h_r(i) * x(t - r*LINE_LEN - i)
//   yout..yout2 = rows at t, yout3 = rows 0+1 at t-1, youtfn = all at t-2
// where h_r(i) = a(2-i,r) for this structure. Pixels before a reset count as
// zero. Runs include bursts of full-scale pixels (255) and a reset in the
// middle of the stream.
module fir2d_broadcast_tb;
  import fir2d_pkg::*;

  localparam bit          BC      = 1'b1;  // structure under test: transposed
  localparam int unsigned L_SHORT = 5;
  localparam int unsigned L_DEF   = 8;
  localparam int          HMAX    = 4096;

  // Kernel from the published taps, by hand: round(16 * w2(i) * w1(j)).
  localparam int K_DEF  [3][3] = '{'{1, 1, 1}, '{3, 4, 3}, '{1, 1, 1}};
  // Non-symmetric test kernel: arbitrary values, no two rows or columns alike.
  localparam int K_ASYM [3][3] = '{'{2, 3, 15}, '{5, 6, 7}, '{8, 1, 10}};

  function automatic coef_mat_t to_mat(input int k [3][3]);
    coef_mat_t m;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) m[i][j] = coef_t'(k[i][j]);
    return m;
  endfunction

  logic       clk = 1'b0;
  logic       reset;
  data_t      x;
  fir2d_out_t y_def, y_asym;

  always #5 clk = ~clk;

  fir2d_broadcast dut_def (.clk, .reset, .x, .y(y_def));
  fir2d_broadcast #(.LINE_LEN(L_SHORT), .A(to_mat(K_ASYM))) dut_asym (
    .clk, .reset, .x, .y(y_asym));

  int unsigned checks = 0, failures = 0;
  int          n;              // pixels captured since reset
  int          hist [HMAX];

  function automatic int px(int k);
    return (k < 0) ? 0 : hist[k];
  endfunction

  function automatic int row(input int k [3][3], int len, int r, int t);
    int s = 0;
    if (t < 0) return 0;
    for (int i = 0; i < 3; i++)
      s += (BC ? k[2-i][r] : k[i][r]) * px(t - r*len - i);
    return s;
  endfunction

  function automatic fir2d_out_t model(input int k [3][3], int len);
    fir2d_out_t e;
    e.yout   = acc_t'(row(k, len, 0, n-1));
    e.yout1  = acc_t'(row(k, len, 1, n-1));
    e.yout2  = acc_t'(row(k, len, 2, n-1));
    e.yout3  = acc_t'(row(k, len, 0, n-2) + row(k, len, 1, n-2));
    e.youtfn = acc_t'(row(k, len, 0, n-3) + row(k, len, 1, n-3) + row(k, len, 2, n-3));
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

  // Present one pixel, clock it in, check both instances.
  task automatic step(data_t v);
    x = v;
    hist[n] = int'(v);
    @(negedge clk);
    n++;
    compare("def",  y_def,  model(K_DEF,  L_DEF));
    compare("asym", y_asym, model(K_ASYM, L_SHORT));
  endtask

  task automatic do_reset(int cycles);
    reset = 1'b1;
    x     = '0;
    repeat (cycles) begin
      @(negedge clk);
      compare("rst_def",  y_def,  '0);
      compare("rst_asym", y_asym, '0);
    end
    reset = 1'b0;
    n     = 0;
  endtask

  initial begin
    n = 0;
    @(negedge clk);
    do_reset(3);
    // Impulse: maps out the kernel and the latency on youtfn.
    step(8'd1);
    repeat (30) step(8'd0);
    // Random image rows with full-scale bursts.
    for (int c = 0; c < 600; c++)
      step((c % 97) < 20 ? 8'hFF : data_t'($urandom));
    // Reset in the middle of a stream, then continue.
    do_reset(2);
    for (int c = 0; c < 300; c++) step(data_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
