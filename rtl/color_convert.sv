// RGB to YCbCr colour conversion for 8-bit samples (precision Ps = 8):
//   Y  =  0.299  R + 0.587  G + 0.114  B
//   Cb = -0.1687 R - 0.3313 G + 0.5    B + 2^(Ps-1)
//   Cr =  0.5    R - 0.4187 G - 0.0813 B + 2^(Ps-1)
// Constants are scaled by 2^16 and rounded; each result is rounded to the
// nearest integer and clipped to 0..255. One register stage: the outputs
// belong to the inputs of the previous clock when in_valid was high
// (out_valid follows in_valid by one clock).
// The formulas are the document's; the luminance weight of B is 0.114
// (the three luminance weights sum to one). The fixed-point format and the
// register stage are this design's own.
module color_convert
  import jpeg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [7:0] r,
  input  logic [7:0] g,
  input  logic [7:0] b,
  output logic       out_valid,
  output logic [7:0] y,
  output logic [7:0] cb,
  output logic [7:0] cr
);

  // round(c * 2^16)
  localparam int KY_R  = 19595, KY_G  = 38470, KY_B  = 7471;
  localparam int KCB_R = 11056, KCB_G = 21712, KCB_B = 32768;
  localparam int KCR_R = 32768, KCR_G = 27440, KCR_B = 5328;
  localparam int OFFS  = 128 << CC_FRAC;
  localparam int HALF  = 1 << (CC_FRAC - 1);

  function automatic logic [7:0] clip(input int v);
    int q;
    q = v >>> CC_FRAC;
    if (q < 0) return 8'd0;
    if (q > 255) return 8'd255;
    return 8'(q);
  endfunction

  int sy, scb, scr;

  always_comb begin
    sy  =  KY_R * int'(r) + KY_G * int'(g) + KY_B * int'(b) + HALF;
    scb = -KCB_R * int'(r) - KCB_G * int'(g) + KCB_B * int'(b) + OFFS + HALF;
    scr =  KCR_R * int'(r) - KCR_G * int'(g) - KCR_B * int'(b) + OFFS + HALF;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      y <= '0; cb <= '0; cr <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y  <= clip(sy);
        cb <= clip(scb);
        cr <= clip(scr);
      end
    end
  end

endmodule
