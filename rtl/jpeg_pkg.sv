// Constants and helper functions of the DCT/quantisation accelerator.
//
// The forward DCT is computed as two passes of an 8-point 1-D DCT scaled by
// sqrt(8), so after both passes the result is 8 * DCT2. Multiplications use
// constants scaled by 2^DCT_FRAC and are truncated (arithmetic shift) after
// each rotation, which reproduces the reference software's integer results.
// Quantisation divides the 8*DCT2 coefficient by 8*Q*(1/2) = 4*Q, rounding
// half away from zero; the luminance table Q below is the standard one. The
// divide is a multiply by a reciprocal computed here at elaboration time.
package jpeg_pkg;

  localparam int DCT_IN_W  = 12;  // 1-D DCT input width (signed)
  localparam int DCT_OUT_W = 16;  // 1-D DCT output width (signed)
  localparam int DCT_FRAC  = 13;  // fraction bits of the DCT constants
  localparam int COEF_W    = 16;  // width of a quantised coefficient in memory
  localparam int PIX_OFFSET = 128; // subtracted from every 8-bit pixel

  // Constant c = round(v * 2^DCT_FRAC) for the values the flow graph needs:
  // cos/sin of 1*pi/16 and 3*pi/16, sqrt(2)*cos of 2*pi/16 and 6*pi/16, sqrt(2).
  localparam int K_C1    = 8035;   // cos(pi/16)
  localparam int K_S1    = 1598;   // sin(pi/16)
  localparam int K_C3    = 6811;   // cos(3pi/16)
  localparam int K_S3    = 4551;   // sin(3pi/16)
  localparam int K_R2C2  = 10703;  // sqrt(2)*cos(2pi/16)
  localparam int K_R2C6  = 4433;   // sqrt(2)*cos(6pi/16)
  localparam int K_R2    = 11585;  // sqrt(2)

  typedef logic signed [DCT_IN_W-1:0]  dct_in_t;
  typedef logic signed [DCT_OUT_W-1:0] dct_out_t;
  typedef logic signed [COEF_W-1:0]    coef_t;

  // Luminance quantisation table, indexed [row k][column l] (vertical, then
  // horizontal frequency).
  localparam int QL [8][8] = '{
    '{16, 11, 10, 16,  24,  40,  51,  61},
    '{12, 12, 14, 19,  26,  58,  60,  55},
    '{14, 13, 16, 24,  40,  57,  69,  56},
    '{14, 17, 22, 29,  51,  87,  80,  62},
    '{18, 22, 37, 56,  68, 109, 103,  77},
    '{24, 35, 55, 64,  81, 104, 113,  92},
    '{49, 64, 78, 87, 103, 121, 120, 101},
    '{72, 92, 95, 98, 112, 100, 103,  99}};

  // Divisor applied to an 8*DCT2 coefficient: 8 * Q * 1/2 = 4 * Q.
  localparam int QDIV_SCALE = 4;

  // Reciprocal precision. With |B| < 2^15 and divisor d <= 4*255,
  // ceil(2^RECIP_FRAC / d) gives exact round-half-away-from-zero quotients
  // whenever |B| * 2 * d < 2^RECIP_FRAC.
  localparam int RECIP_FRAC = 26;
  localparam int RECIP_W    = 22;

  function automatic logic [RECIP_W-1:0] recip_of(input int q);
    longint d;
    d = longint'(q) * QDIV_SCALE;
    return RECIP_W'(((longint'(1) <<< RECIP_FRAC) + d - 1) / d);
  endfunction

  // Zig-zag scan: position n (0..63) of the scan -> row-major index
  // 8*row + column. The scan walks the anti-diagonals s = row + column in
  // turn, upwards (row decreasing) on even s and downwards on odd s. The
  // whole table is built once, as a constant.
  typedef logic [5:0] zz_table_t [64];

  function automatic zz_table_t zigzag_table();
    zz_table_t t;
    int cnt, r;
    cnt = 0;
    t   = '{default: '0};
    for (int s = 0; s < 15; s++)
      for (int i = 0; i < 8; i++) begin
        r = (s % 2 == 0) ? s - i : i;          // row visited i-th on this diagonal
        if (r >= 0 && r < 8 && s - r >= 0 && s - r < 8) begin
          t[cnt] = 6'(8 * r + (s - r));
          cnt++;
        end
      end
    return t;
  endfunction

  localparam zz_table_t ZIGZAG = zigzag_table();

  // Luminance/chrominance conversion constants, scaled by 2^16.
  localparam int CC_FRAC = 16;

  // Entropy coder symbols
  localparam logic [7:0] SYM_EOB = 8'h00;   // end of block
  localparam logic [7:0] SYM_ZRL = 8'hF0;   // run of 16 zeros

endpackage
