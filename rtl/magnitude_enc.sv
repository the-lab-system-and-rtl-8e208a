// Magnitude encoding of a JPEG coefficient (or DC difference).
//
// size is the number of bits needed for |v| (0 for v = 0, 1 for +-1,
// 2 for +-2..3, ..., 11 for +-1024..2047), the "encoded value" of the
// magnitude table. bits carries the value itself in size bits: v for a
// positive value, v - 1 (ones' complement of |v|) for a negative one, so
// that a negative value starts with a 0 bit. Only bits [size-1:0] are
// meaningful; the rest are zero. Combinational.
module magnitude_enc
  import jpeg_pkg::*;
(
  input  logic signed [11:0] v,
  output logic [3:0]         size,
  output logic [10:0]        bits
);

  logic [11:0] mag;
  logic [11:0] raw;

  always_comb begin
    mag  = v[11] ? 12'(-v) : 12'(v);
    size = '0;
    for (int i = 0; i < 12; i++) if (mag[i]) size = 4'(i + 1);
    raw  = v[11] ? 12'(v - 12'sd1) : 12'(v);
    bits = '0;
    for (int i = 0; i < 11; i++) if (i < int'(size)) bits[i] = raw[i];
  end

endmodule
