// line_delay_tb: self-checking test of the one-line delay.
//
// Runs the default line (8) and a short line (3) and a single-stage line on
// the same random stream. Each output must equal the input from exactly
// LINE_LEN clocks earlier, and zero while the line refills after a reset
// (the model treats pixels from before a reset as zero). A reset in the
// middle of the stream checks that the synchronous reset clears every stage.
module line_delay_tb;

  localparam int HMAX = 2048;

  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] din;
  logic [7:0] q8, q3, q1;

  always #5 clk = ~clk;

  line_delay                  dut8 (.i_clk(clk), .i_sync_reset(rst), .i_data(din), .o_data(q8));
  line_delay #(.LINE_LEN(3))  dut3 (.i_clk(clk), .i_sync_reset(rst), .i_data(din), .o_data(q3));
  line_delay #(.LINE_LEN(1))  dut1 (.i_clk(clk), .i_sync_reset(rst), .i_data(din), .o_data(q1));

  int unsigned checks = 0, failures = 0;
  int          n;
  logic [7:0]  hist [HMAX];

  function automatic logic [7:0] past(int len);
    return (n - len < 0) ? 8'd0 : hist[n - len];
  endfunction

  task automatic chk(string tag, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s n=%0d got %0d exp %0d", tag, n, got, exp);
    end
  endtask

  task automatic step(logic [7:0] v);
    din     = v;
    hist[n] = v;
    @(negedge clk);
    n++;
    chk("len8", q8, past(8));
    chk("len3", q3, past(3));
    chk("len1", q1, past(1));
  endtask

  initial begin
    rst = 1'b1; din = '0; n = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 200; c++) step(8'($urandom));
    rst = 1'b1;
    @(negedge clk);
    chk("rst8", q8, 8'd0);
    chk("rst3", q3, 8'd0);
    chk("rst1", q1, 8'd0);
    rst = 1'b0;
    n   = 0;
    for (int c = 0; c < 200; c++) step(8'($urandom));
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
