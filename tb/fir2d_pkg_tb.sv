// fir2d_pkg_tb: checks the elaboration-time kernel of fir2d_pkg.
//
// The outer product of the prototype taps (0.280 0.439 0.280) and
// (0.211 0.576 0.211), scaled by 16 and rounded, worked out by hand:
//   16*0.211*0.280 = 0.945 -> 1    16*0.211*0.439 = 1.482 -> 1
//   16*0.576*0.280 = 2.580 -> 3    16*0.576*0.439 = 4.046 -> 4
// giving a(0,*) = 1 1 1, a(1,*) = 3 4 3, a(2,*) = 1 1 1. Also checks the
// function on a second tap set where rounding and saturation matter.
module fir2d_pkg_tb;
  import fir2d_pkg::*;

  localparam int K [3][3] = '{'{1, 1, 1}, '{3, 4, 3}, '{1, 1, 1}};

  // w1 = (0.500 0.900 0.031), w2 = (0.250 0.999 0.100):
  // 16*w2(i)*w1(j) = {2.0 3.6 0.124}, {7.992 14.386 0.495}, {0.8 1.44 0.0496}
  localparam proto_t T1 = '{500, 900, 31};
  localparam proto_t T2 = '{250, 999, 100};
  localparam int     KT [3][3] = '{'{2, 4, 0}, '{8, 14, 0}, '{1, 1, 0}};
  // w1 = w2 = (1.000 ...): 16*1*1 = 16 saturates to 15.
  localparam proto_t T3 = '{1000, 0, 0};

  int unsigned checks = 0, failures = 0;

  task automatic chk(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", tag, got, exp);
    end
  endtask

  initial begin
    coef_mat_t m;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        chk($sformatf("COEFS[%0d][%0d]", i, j), int'(COEFS[i][j]), K[i][j]);
    m = fir2d_coefs(T1, T2);
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        chk($sformatf("T[%0d][%0d]", i, j), int'(m[i][j]), KT[i][j]);
    m = fir2d_coefs(T3, T3);
    chk("saturate", int'(m[0][0]), 15);
    chk("zero", int'(m[1][1]), 0);
    chk("widths", int'(PROD_W), 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
