// Chroma resampling: replaces each 2x2 group of chrominance samples by
// their average, rounded to nearest (halves up), so Cb and Cr keep a
// quarter of their samples. With full-resolution luminance this halves the
// amount of data (1 + 1/4 + 1/4 of 3 samples per pixel). Combinational;
// one instance handles one component. The document shows the resampling
// and the 50 % reduction; the 2x2 averaging is this design's reading of it.
module chroma_subsample (
  input  logic [7:0] c00,
  input  logic [7:0] c01,
  input  logic [7:0] c10,
  input  logic [7:0] c11,
  output logic [7:0] c
);

  logic [9:0] sum;

  always_comb begin
    sum = 10'(c00) + 10'(c01) + 10'(c10) + 10'(c11) + 10'd2;
    c   = sum[9:2];
  end

endmodule
