// One quantiser lane: divides an 8*DCT2 coefficient by 4*Q and rounds half
// away from zero, i.e. Y = round(8*B / (8*Q*1/2)) with quality factor 1/2.
//
// The divide is a multiply by recip = ceil(2^RECIP_FRAC / (4*Q)) on the
// magnitude, plus half an LSB, then a shift; the sign is put back at the
// end. With RECIP_FRAC = 26 this is exact for every 16-bit input and every
// 8-bit Q (see jpeg_pkg). Combinational; the lane holds no state.
module quantizer
  import jpeg_pkg::*;
(
  input  dct_out_t               din,    // 8 * DCT2 coefficient
  input  logic [RECIP_W-1:0]     recip,  // reciprocal of 4*Q for this position
  output coef_t                  dout    // quantised coefficient
);

  logic [DCT_OUT_W:0]                mag;
  logic [DCT_OUT_W+RECIP_W:0]        prod;
  logic [DCT_OUT_W+RECIP_W-RECIP_FRAC:0] q;

  always_comb begin
    mag  = din[DCT_OUT_W-1] ? (DCT_OUT_W+1)'(-din) : (DCT_OUT_W+1)'(din);
    prod = (DCT_OUT_W+RECIP_W+1)'(mag) * (DCT_OUT_W+RECIP_W+1)'(recip)
         + ((DCT_OUT_W+RECIP_W+1)'(1) << (RECIP_FRAC - 1));
    q    = prod[DCT_OUT_W+RECIP_W:RECIP_FRAC];
    dout = din[DCT_OUT_W-1] ? -coef_t'(q) : coef_t'(q);
  end

endmodule
