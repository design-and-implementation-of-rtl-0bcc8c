// fir2d_pkg: widths, types and coefficients shared by the 2-D FIR filter.
//
// The 3x3 low-pass kernel is separable. Two 3-tap 1-D low-pass prototypes,
// W1 (cut-off 0.5) and W2 (cut-off 0.7), both designed with a rectangular
// window, are combined by an outer product, a(i,j) = W2(i) * W1(j), so that
// the middle row of the kernel is the one that carries W2's large centre tap.
// The prototype taps are kept here in thousandths, exactly as published, and
// the outer product is evaluated at elaboration time by fir2d_coefs(), then
// rounded to COEF_W-bit unsigned integers with COEF_FRAC fractional bits
// (saturating, although none of the published taps needs it).
// With the published taps the kernel becomes
//     a(0,*) = 1 1 1,   a(1,*) = 3 4 3,   a(2,*) = 1 1 1   (sum 16 = 1.0)
// so the filter has unity DC gain once the 16-bit output is divided by 16.
//
// From the published design: 8-bit samples, 4-bit coefficients feeding
// 12-bit products, 16-bit row and output sums, 3 taps per dimension, the
// prototype taps and the outer-product rule. The choice of 4 fractional
// bits, unsigned arithmetic and round-to-nearest is this design's own.
package fir2d_pkg;

  localparam int unsigned DATA_W    = 8;   // pixel width
  localparam int unsigned COEF_W    = 4;   // coefficient width
  localparam int unsigned PROD_W    = DATA_W + COEF_W;  // 12-bit products
  localparam int unsigned ACC_W     = 16;  // row sums and outputs
  localparam int unsigned TAPS      = 3;   // taps per dimension
  localparam int unsigned COEF_FRAC = 4;   // coefficient scale 2**COEF_FRAC

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [COEF_W-1:0] coef_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [ACC_W-1:0]  acc_t;

  // One row of taps: element k weights x(n-k) in the 1-D row equation.
  typedef coef_t [TAPS-1:0] coef_row_t;
  // Kernel a(i,j): first index i along a line (n1), second j across lines (n2).
  typedef coef_row_t [TAPS-1:0] coef_mat_t;

  // Registered outputs of a 2-D filter, named after the published signals.
  typedef struct packed {
    acc_t yout;    // row 0 sum, lines n2
    acc_t yout1;   // row 1 sum, line n2-1
    acc_t yout2;   // row 2 sum, line n2-2
    acc_t yout3;   // yout + yout1
    acc_t youtfn;  // filter output y(n1,n2) = yout3 + yout2
  } fir2d_out_t;

  // 1-D prototype taps, in thousandths.
  typedef int unsigned proto_t [TAPS];
  localparam proto_t W1_MILLI = '{280, 439, 280};  // cut-off 0.5
  localparam proto_t W2_MILLI = '{211, 576, 211};  // cut-off 0.7

  // Outer product a(i,j) = W2(i) * W1(j), scaled by 2**COEF_FRAC and rounded.
  function automatic coef_mat_t fir2d_coefs(input proto_t w1, input proto_t w2);
    coef_mat_t   m;
    int unsigned p;
    for (int i = 0; i < TAPS; i++) begin
      for (int j = 0; j < TAPS; j++) begin
        p       = (w2[i] * w1[j] * (1 << COEF_FRAC) + 500_000) / 1_000_000;
        // Saturate a tap that would not fit in COEF_W bits.
        m[i][j] = (p > (1 << COEF_W) - 1) ? '1 : coef_t'(p);
      end
    end
    return m;
  endfunction

  localparam coef_mat_t COEFS = fir2d_coefs(W1_MILLI, W2_MILLI);

endpackage
