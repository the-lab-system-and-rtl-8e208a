// Self-checking testbench for jpeg_entropy_coder (run-length coder and
// Huffman coder together). The worked example block is coded twice in
// one image, then the stream is flushed. Tables: the five AC codes the
// example prints, 16-bit codes 11000000+symbol for the other AC symbols,
// and the usual luminance DC category codes (00, 010, 011, 100, 101, 110,
// 1110, ...). The expected bit string is built here from the symbol list
// 05 10110, 04 1100, 13 100, 24 0011, 04 0111, F0, F0, D1 1, 00 (the
// second block has DC difference 0, category 00), padded with ones, and
// every output byte is compared with it, under random out_ready stalls.
module tb_jpeg_entropy_coder;
  import jpeg_pkg::*;
  logic clk = 0, rst = 1;
  logic tbl_we, tbl_ac;
  logic [7:0] tbl_addr;
  logic [4:0] tbl_len;
  logic [15:0] tbl_code;
  logic new_image, start, busy, block_done, out_valid, out_ready, flush, flush_done;
  coef_t coef [64];
  logic [7:0] out_byte;
  int checks = 0, failures = 0, n_bytes = 0, n_done = 0;

  jpeg_entropy_coder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ac_len [256], ac_code [256];
  int dc_len [12] = '{2, 3, 3, 3, 3, 3, 4, 5, 6, 7, 8, 9};
  int dc_code [12] = '{'b00, 'b010, 'b011, 'b100, 'b101, 'b110, 'b1110, 'b11110,
                       'b111110, 'b1111110, 'b11111110, 'b111111110};
  bit exp_bits [$];

  task automatic push_bits(input int v, input int n);
    for (int i = n - 1; i >= 0; i--) exp_bits.push_back(v[i]);
  endtask

  task automatic push_ac(input int sym, input int raw);
    push_bits(ac_code[sym], ac_len[sym]);
    push_bits(raw, sym % 16);
  endtask

  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    bit b;
    n_bytes++;
    checks++;
    if (exp_bits.size() < 8) begin failures++; $display("extra byte %h", out_byte); end
    else for (int i = 7; i >= 0; i--) begin
      b = exp_bits.pop_front();
      if (out_byte[i] != b) begin failures++; $display("byte %0d = %h, bit %0d wrong", n_bytes, out_byte, i); break; end
    end
  end
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (!rst && block_done) n_done++;

  initial begin
    new_image = 0; start = 0; flush = 0;
    tbl_we = 0; tbl_ac = 0; tbl_addr = 0; tbl_len = 0; tbl_code = 0;
    for (int i = 0; i < 64; i++) coef[i] = '0;
    for (int s = 0; s < 256; s++) begin ac_len[s] = 16; ac_code[s] = 'hC000 | s; end
    ac_len[0] = 4; ac_code[0] = 'b1010;
    ac_len[1] = 2; ac_code[1] = 'b00;
    ac_len[2] = 2; ac_code[2] = 'b01;
    ac_len[3] = 3; ac_code[3] = 'b100;
    ac_len[4] = 4; ac_code[4] = 'b1011;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int s = 0; s < 256; s++) begin
      tbl_we = 1; tbl_ac = 1; tbl_addr = 8'(s); tbl_len = 5'(ac_len[s]); tbl_code = 16'(ac_code[s]);
      @(negedge clk);
    end
    for (int s = 0; s < 12; s++) begin
      tbl_we = 1; tbl_ac = 0; tbl_addr = 8'(s); tbl_len = 5'(dc_len[s]); tbl_code = 16'(dc_code[s]);
      @(negedge clk);
    end
    tbl_we = 0;
    new_image = 1; @(negedge clk); new_image = 0;

    // expected stream for two copies of the example block
    for (int k = 0; k < 2; k++) begin
      if (k == 0) begin push_bits(dc_code[5], dc_len[5]); push_bits('b10110, 5); end
      else push_bits(dc_code[0], dc_len[0]);
      push_ac('h04, 'b1100); push_ac('h13, 'b100); push_ac('h24, 'b0011);
      push_ac('h04, 'b0111); push_ac('hF0, 0); push_ac('hF0, 0); push_ac('hD1, 'b1);
      push_ac('h00, 0);
    end
    push_bits(255, (8 - exp_bits.size() % 8) % 8);
    // the printed "04 1100 => ...10111100..." sits right after the DC code
    checks++;
    begin
      int v;
      v = 0;
      for (int i = 8; i < 16; i++) v = v * 2 + int'(exp_bits[i]);
      if (v != 'b10111100) failures++;
    end

    coef[0] = 22; coef[1] = 12; coef[3] = -12; coef[10] = -8; coef[16] = 4; coef[31] = 1;
    for (int k = 0; k < 2; k++) begin
      start = 1; @(negedge clk); start = 0;
      while (busy) @(negedge clk);
    end
    flush = 1; @(negedge clk); flush = 0;
    while (!flush_done) @(negedge clk);
    checks++;
    if (exp_bits.size() != 0 || n_done != 2) begin
      failures++; $display("%0d bits not sent, %0d blocks done", exp_bits.size(), n_done);
    end
    $display("bytes %0d", n_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
