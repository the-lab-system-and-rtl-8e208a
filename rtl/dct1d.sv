// 8-point 1-D DCT after Loeffler, in fixed point, purely combinational.
//
// Computes X[k] = c(k) * sqrt(8) * sum_x x[x] * cos((2x+1) k pi / 16), with
// c(0) = sqrt(1/8) and c(k) = 1/2 otherwise, i.e. X[0] is the plain sum and
// every other output carries a factor sqrt(2). Applying it to the rows and
// then to the columns of an 8x8 block gives 8 * DCT2.
//
// Flow graph: a butterfly stage; the even half is a second butterfly stage,
// a third one (X0, X4) and a rotator by 6pi/16 whose sqrt(2) gain is folded
// into its constants (k3*(k1 x + k2 y) = k3k1 x + k3k2 y); the odd half is
// two rotators (3pi/16 and pi/16), a butterfly stage, and a final butterfly
// plus two multiplications by sqrt(2). Constants carry DCT_FRAC = 13
// fraction bits. Each output is truncated toward minus infinity (arithmetic
// shift) at the very end; the odd-part rotator results stay at full
// precision until the sqrt(2) multiply.
//
// Interface: x[0..7] 12-bit signed inputs, X[0..7] 16-bit signed outputs,
// as the document's DCT unit (8 in ports of 12 bits, 8 out ports of 16 bits).
// No clock: results are valid in the same cycle.
module dct1d
  import jpeg_pkg::*;
(
  input  dct_in_t  x [8],
  output dct_out_t X [8]
);

  typedef logic signed [47:0] acc_t;

  acc_t a [8];
  acc_t b0, b1, b2, b3;
  acc_t e2, e6;
  acc_t t4, t5, t6, t7;
  acc_t u4, u5, u6, u7;
  acc_t o1, o7, o3, o5;

  always_comb begin
    // stage 1: butterflies
    a[0] = acc_t'(x[0]) + acc_t'(x[7]);
    a[1] = acc_t'(x[1]) + acc_t'(x[6]);
    a[2] = acc_t'(x[2]) + acc_t'(x[5]);
    a[3] = acc_t'(x[3]) + acc_t'(x[4]);
    a[4] = acc_t'(x[3]) - acc_t'(x[4]);
    a[5] = acc_t'(x[2]) - acc_t'(x[5]);
    a[6] = acc_t'(x[1]) - acc_t'(x[6]);
    a[7] = acc_t'(x[0]) - acc_t'(x[7]);

    // even part
    b0 = a[0] + a[3];
    b1 = a[1] + a[2];
    b2 = a[1] - a[2];
    b3 = a[0] - a[3];
    e2 = b3 * acc_t'(K_R2C2) + b2 * acc_t'(K_R2C6);
    e6 = b3 * acc_t'(K_R2C6) - b2 * acc_t'(K_R2C2);

    // odd part: rotators by 3pi/16 and pi/16
    t4 = a[4] * acc_t'(K_C3) + a[7] * acc_t'(K_S3);
    t7 = a[7] * acc_t'(K_C3) - a[4] * acc_t'(K_S3);
    t5 = a[5] * acc_t'(K_C1) + a[6] * acc_t'(K_S1);
    t6 = a[6] * acc_t'(K_C1) - a[5] * acc_t'(K_S1);
    u4 = t4 + t6;
    u6 = t4 - t6;
    u7 = t7 + t5;
    u5 = t7 - t5;
    o1 = u7 + u4;
    o7 = u7 - u4;
    o3 = u5 * acc_t'(K_R2);
    o5 = u6 * acc_t'(K_R2);

    X[0] = dct_out_t'(b0 + b1);
    X[4] = dct_out_t'(b0 - b1);
    X[2] = dct_out_t'(e2 >>> DCT_FRAC);
    X[6] = dct_out_t'(e6 >>> DCT_FRAC);
    X[1] = dct_out_t'(o1 >>> DCT_FRAC);
    X[7] = dct_out_t'(o7 >>> DCT_FRAC);
    X[3] = dct_out_t'(o3 >>> (2 * DCT_FRAC));
    X[5] = dct_out_t'(o5 >>> (2 * DCT_FRAC));
  end

endmodule
