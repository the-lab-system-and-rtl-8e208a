// Self-checking testbench for huffman_enc.
// AC table: the five codes the worked example prints (00 -> 1010,
// 01 -> 00, 02 -> 01, 03 -> 100, 04 -> 1011); every other AC symbol gets
// a 16-bit code 11000000 followed by the symbol, so the longest code is
// exercised. DC table: a code of 2..9 bits chosen here. Random symbol
// streams with random gaps and random out_ready stalls are compared bit
// for bit against a queue of expected bits; after flush the last byte
// must be padded with ones and flush_done must follow. The printed
// example "04 1100" must appear as the bits 1011 1100.
module tb_huffman_enc;
  logic clk = 0, rst = 1;
  logic tbl_we, tbl_ac;
  logic [7:0] tbl_addr;
  logic [4:0] tbl_len;
  logic [15:0] tbl_code;
  logic s_valid, s_ready, s_is_dc;
  logic [7:0] s_sym;
  logic [3:0] s_size;
  logic [10:0] s_bits;
  logic out_valid, out_ready, flush, flush_done;
  logic [7:0] out_byte;
  int checks = 0, failures = 0, n_bytes = 0, n_stall = 0, n_full = 0;

  huffman_enc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ac_len [256], ac_code [256], dc_len [256], dc_code [256];
  bit exp_bits [$];

  task automatic push_bits(input int v, input int n);
    for (int i = n - 1; i >= 0; i--) exp_bits.push_back(v[i]);
  endtask

  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    bit b;
    n_bytes++;
    checks++;
    if (exp_bits.size() < 8) begin failures++; $display("extra byte %h", out_byte); end
    else for (int i = 7; i >= 0; i--) begin
      b = exp_bits.pop_front();
      if (out_byte[i] != b) begin failures++; $display("byte %0d: %h bit %0d wrong", n_bytes, out_byte, i); break; end
    end
  end
  always @(posedge clk) if (!rst && out_valid && !out_ready) n_stall++;
  always @(posedge clk) if (!rst && s_valid && !s_ready) n_full++;

  always @(negedge clk) out_ready <= ($urandom_range(0, 2) != 0);

  task automatic send(input bit dc, input int sym, input int size, input int bits);
    s_valid = 1; s_is_dc = dc; s_sym = 8'(sym); s_size = 4'(size); s_bits = 11'(bits);
    if (dc) push_bits(dc_code[sym], dc_len[sym]); else push_bits(ac_code[sym], ac_len[sym]);
    push_bits(bits, size);
    @(posedge clk);
    while (!s_ready) @(posedge clk);
    @(negedge clk);
    s_valid = 0;
  endtask

  task automatic do_flush();
    int pad;
    pad = (8 - exp_bits.size() % 8) % 8;
    push_bits(255, pad);
    flush = 1;
    @(negedge clk);
    flush = 0;
    while (!flush_done) @(negedge clk);
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("%0d bits never sent", exp_bits.size()); end
  endtask

  initial begin
    s_valid = 0; s_is_dc = 0; s_sym = 0; s_size = 0; s_bits = 0; flush = 0;
    tbl_we = 0; tbl_ac = 0; tbl_addr = 0; tbl_len = 0; tbl_code = 0;
    for (int s = 0; s < 256; s++) begin
      ac_len[s] = 16; ac_code[s] = 'hC000 | s;
      dc_len[s] = 2 + s % 8; dc_code[s] = (s * 37) & ((1 << dc_len[s]) - 1);
    end
    ac_len[0] = 4; ac_code[0] = 'b1010;
    ac_len[1] = 2; ac_code[1] = 'b00;
    ac_len[2] = 2; ac_code[2] = 'b01;
    ac_len[3] = 3; ac_code[3] = 'b100;
    ac_len[4] = 4; ac_code[4] = 'b1011;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 2; t++)
      for (int s = 0; s < 256; s++) begin
        tbl_we = 1; tbl_ac = t[0]; tbl_addr = 8'(s);
        tbl_len = 5'(t ? ac_len[s] : dc_len[s]); tbl_code = 16'(t ? ac_code[s] : dc_code[s]);
        @(negedge clk);
      end
    tbl_we = 0;

    // printed example: symbol 04 with raw bits 1100 at a byte boundary
    send(0, 'h04, 4, 'b1100);
    repeat (4) @(negedge clk);
    checks++;
    if (n_bytes != 1) failures++;
    do_flush();

    for (int t = 0; t < 3000; t++) begin
      int sym, size;
      bit dc;
      dc = ($urandom_range(0, 7) == 0);
      size = dc ? $urandom_range(0, 11) : $urandom_range(0, 10);
      sym = dc ? size : ($urandom_range(0, 3) == 0 ? $urandom_range(0, 4) : ($urandom_range(0, 15) * 16 + size));
      if (!dc && sym <= 4) size = sym;
      send(dc, sym, size, size == 0 ? 0 : $urandom_range(0, (1 << size) - 1));
      if ($urandom_range(0, 3) == 0) @(negedge clk);
      if ($urandom_range(0, 499) == 0) do_flush();
    end
    do_flush();
    checks++;
    if (n_stall == 0 || n_full == 0) failures++;
    $display("bytes %0d, output stalls %0d, input stalls %0d", n_bytes, n_stall, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
