// Entropy coder of baseline JPEG for quantised 8x8 blocks: zig-zag scan,
// DC differences, run-length coding, magnitude coding (rle_encoder) and
// Huffman coding with two loadable tables plus bit packing (huffman_enc).
//
// Load the DC and AC tables through tbl_*, then present a block of 64
// quantised coefficients (row-major) with start; symbols flow from the
// run-length coder into the Huffman coder without gaps when the packer has
// room, and bytes come out on out_valid/out_byte. block_done pulses when
// the last symbol of the block has been taken; flush ends the stream
// (flush_done). new_image clears the DC predictor between images.
module jpeg_entropy_coder
  import jpeg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        tbl_we,
  input  logic        tbl_ac,
  input  logic [7:0]  tbl_addr,
  input  logic [4:0]  tbl_len,
  input  logic [15:0] tbl_code,
  input  logic        new_image,
  input  logic        start,
  input  coef_t       coef [64],
  output logic        busy,
  output logic        block_done,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_byte,
  input  logic        flush,
  output logic        flush_done
);

  logic        sym_valid, sym_ready, is_dc;
  logic [7:0]  sym;
  logic [3:0]  size;
  logic [10:0] bits;

  rle_encoder u_rle (
    .clk, .rst, .new_image, .start, .coef, .busy, .done(block_done),
    .sym_valid, .sym_ready, .sym, .size, .bits, .is_dc
  );

  huffman_enc u_huff (
    .clk, .rst, .tbl_we, .tbl_ac, .tbl_addr, .tbl_len, .tbl_code,
    .s_valid(sym_valid), .s_ready(sym_ready), .s_is_dc(is_dc), .s_sym(sym),
    .s_size(size), .s_bits(bits),
    .out_valid, .out_ready, .out_byte, .flush, .flush_done
  );

endmodule
