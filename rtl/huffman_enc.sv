// Huffman coder and bit packer of the JPEG entropy coder.
//
// Two look-up tables, one for DC and one for AC symbols, map an 8-bit
// symbol to a code of 1..16 bits (code right-aligned, plus its length).
// Software fills them through the table write port, as it would from the
// file's DHT segments. For each incoming symbol the code is looked up and
// sent, most significant bit first, followed by the symbol's raw magnitude
// bits (size bits, untouched). The bit stream is packed into bytes, first
// bit in bit 7, and the bytes are handed out one per clock.
//
// Handshakes: a symbol is taken on a clock with s_valid and s_ready;
// s_ready is high while at most 29 bits wait in the packer (a symbol adds
// at most 16 + 11 = 27). A byte leaves on a clock with out_valid and
// out_ready. flush (a pulse, when no symbol is pending) pads the last
// partial byte with 1 bits and raises flush_done once every byte is out.
// The document gives the two tables, the 16-bit maximum code length and
// that raw bits follow the code untouched; padding with ones, the packer
// and the handshakes are this design's own. No 0x00 is inserted after a
// 0xFF byte (not part of this block).
module huffman_enc (
  input  logic        clk,
  input  logic        rst,
  // table write port
  input  logic        tbl_we,
  input  logic        tbl_ac,
  input  logic [7:0]  tbl_addr,
  input  logic [4:0]  tbl_len,
  input  logic [15:0] tbl_code,
  // symbols
  input  logic        s_valid,
  output logic        s_ready,
  input  logic        s_is_dc,
  input  logic [7:0]  s_sym,
  input  logic [3:0]  s_size,
  input  logic [10:0] s_bits,
  // bytes
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_byte,
  // end of stream
  input  logic        flush,
  output logic        flush_done
);

  typedef struct packed {
    logic [4:0]  len;
    logic [15:0] code;
  } hcode_t;

  hcode_t dc_lut [256];
  hcode_t ac_lut [256];

  always_ff @(posedge clk) begin
    if (tbl_we) begin
      if (tbl_ac) ac_lut[tbl_addr] <= '{len: tbl_len, code: tbl_code};
      else        dc_lut[tbl_addr] <= '{len: tbl_len, code: tbl_code};
    end
  end

  logic [63:0] acc;        // the last `fill` bits are valid, oldest highest
  logic [6:0]  fill;
  logic        flushing;

  hcode_t      hc;
  logic [5:0]  n_in;
  logic [26:0] v_in;
  logic        take, give;
  logic [2:0]  pad;

  always_comb begin
    hc        = s_is_dc ? dc_lut[s_sym] : ac_lut[s_sym];
    n_in      = 6'(hc.len) + 6'(s_size);
    v_in      = (27'(hc.code) << s_size) | 27'(s_bits);
    s_ready   = !flushing && fill <= 7'd29;
    take      = s_valid && s_ready;
    out_valid = fill >= 7'd8;
    out_byte  = 8'(acc >> (fill - 7'd8));
    give      = out_valid && out_ready;
    pad       = 3'(7'd8 - 7'(fill[2:0]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc        <= '0;
      fill       <= '0;
      flushing   <= 1'b0;
      flush_done <= 1'b0;
    end else begin
      flush_done <= 1'b0;
      if (take) begin
        acc  <= (acc << n_in) | 64'(v_in);
        fill <= fill + 7'(n_in) - (give ? 7'd8 : 7'd0);
      end else if (flushing && fill < 7'd8 && fill != 7'd0) begin
        acc  <= (acc << pad) | ((64'd1 << pad) - 64'd1);   // pad with ones
        fill <= fill + 7'(pad);
      end else if (give) begin
        fill <= fill - 7'd8;
      end
      if (flush) flushing <= 1'b1;
      if (flushing && fill == 7'd0) begin
        flushing   <= 1'b0;
        flush_done <= 1'b1;
      end
    end
  end

  a_len_ok: assert property (@(posedge clk) disable iff (rst) take |-> hc.len != 5'd0 && hc.len <= 5'd16);

endmodule
