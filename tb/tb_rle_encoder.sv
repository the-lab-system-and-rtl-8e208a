// Self-checking testbench for rle_encoder.
//  1. The worked example block (22 12 0 -12 / 0 0 -8 / 4 / ... 1 at row 3,
//     column 7) must give exactly 05 10110, 04 1100, 13 100, 24 0011,
//     04 0111, F0, F0, D1 1, 00.
//  2. Random sparse blocks, an all-zero block and a block whose last AC
//     term is non-zero, with random stalls on sym_ready, against a model
//     that builds the zig-zag order by sorting positions on the diagonal.
//     DC symbols must code the difference to the previous block.
module tb_rle_encoder;
  import jpeg_pkg::*;
  logic clk = 0, rst = 1;
  logic new_image, start, busy, done, sym_valid, sym_ready, is_dc;
  coef_t coef [64];
  logic [7:0] sym;
  logic [3:0] size;
  logic [10:0] bits;
  int checks = 0, failures = 0, n_zrl = 0, n_eob = 0, n_stall = 0;

  rle_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference zig-zag: positions ordered by diagonal, direction alternating
  int zz_ref [64];
  initial begin
    int k;
    k = 0;
    for (int d = 0; d < 15; d++)
      for (int j = 0; j < 8; j++) begin
        int rr;
        rr = (d % 2 == 1) ? j : d - j;
        if (rr >= 0 && rr < 8 && d - rr >= 0 && d - rr < 8) begin zz_ref[k] = rr*8 + d - rr; k++; end
      end
  end

  function automatic int sz(input int v);
    int m, s;
    m = v < 0 ? -v : v; s = 0;
    while (m != 0) begin s++; m = m >> 1; end
    return s;
  endfunction

  function automatic int rawb(input int v);
    int s;
    s = sz(v);
    return v < 0 ? v + (1 << s) - 1 : v;
  endfunction

  int exp_sym [$], exp_bits [$], exp_dc [$];
  int prev_dc = 0;

  task automatic model(input int blk [64]);
    int seq [64], last, run;
    for (int i = 0; i < 64; i++) seq[i] = blk[zz_ref[i]];
    exp_sym.push_back(sz(seq[0] - prev_dc)); exp_bits.push_back(rawb(seq[0] - prev_dc)); exp_dc.push_back(1);
    prev_dc = seq[0];
    last = 0;
    for (int i = 1; i < 64; i++) if (seq[i] != 0) last = i;
    run = 0;
    for (int i = 1; i <= last; i++) begin
      if (seq[i] == 0) run++;
      else begin
        while (run >= 16) begin exp_sym.push_back(8'hF0); exp_bits.push_back(0); exp_dc.push_back(0); run -= 16; end
        exp_sym.push_back(run * 16 + sz(seq[i])); exp_bits.push_back(rawb(seq[i])); exp_dc.push_back(0);
        run = 0;
      end
    end
    if (last != 63) begin exp_sym.push_back(0); exp_bits.push_back(0); exp_dc.push_back(0); end
  endtask

  // consumer with random stalls
  always @(posedge clk) if (!rst && sym_valid && sym_ready) begin
    int es, eb, ed;
    checks++;
    if (exp_sym.size() == 0) begin failures++; $display("unexpected symbol %h", sym); end
    else begin
      es = exp_sym.pop_front(); eb = exp_bits.pop_front(); ed = exp_dc.pop_front();
      if (int'(sym) != es || int'(bits) != eb || int'(is_dc) != ed || (ed == 0 && int'(size) != es % 16)) begin
        failures++;
        $display("symbol %h bits %b dc %0d, expected %h %b %0d", sym, bits, is_dc, es, eb, ed);
      end
      if (sym == 8'hF0 && !is_dc) n_zrl++;
      if (sym == 8'h00 && !is_dc) n_eob++;
    end
  end
  always @(posedge clk) if (!rst && sym_valid && !sym_ready) n_stall++;

  task automatic run_block(input int blk [64]);
    model(blk);
    @(negedge clk);
    for (int i = 0; i < 64; i++) coef[i] = coef_t'(blk[i]);
    start = 1;
    @(negedge clk);
    start = 0;
    while (busy) begin
      sym_ready = ($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    sym_ready = 1;
    checks++;
    if (exp_sym.size() != 0) begin failures++; $display("%0d symbols missing", exp_sym.size()); end
  endtask

  initial begin
    int blk [64];
    new_image = 0; start = 0; sym_ready = 1;
    for (int i = 0; i < 64; i++) coef[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;

    // 1: worked example, printed symbols
    for (int i = 0; i < 64; i++) blk[i] = 0;
    blk[0] = 22; blk[1] = 12; blk[3] = -12; blk[10] = -8; blk[16] = 4; blk[31] = 1;
    model(blk);
    begin
      int ps [9] = '{'h05, 'h04, 'h13, 'h24, 'h04, 'hF0, 'hF0, 'hD1, 'h00};
      int pb [9] = '{'b10110, 'b1100, 'b100, 'b0011, 'b0111, 0, 0, 'b1, 0};
      checks++;
      if (exp_sym.size() != 9) failures++;
      else for (int i = 0; i < 9; i++) if (exp_sym[i] != ps[i] || exp_bits[i] != pb[i]) failures++;
      exp_sym.delete(); exp_bits.delete(); exp_dc.delete(); prev_dc = 0;
    end
    run_block(blk);

    // 2: all-zero block, last coefficient non-zero, random blocks
    @(negedge clk); new_image = 1; @(negedge clk); new_image = 0; prev_dc = 0;
    for (int i = 0; i < 64; i++) blk[i] = 0;
    run_block(blk);
    blk[63] = -5; blk[0] = 100;
    run_block(blk);
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 64; i++)
        blk[i] = ($urandom_range(0, 99) < 15) ? int'($urandom_range(0, 2046)) - 1023 : 0;
      blk[0] = int'($urandom_range(0, 1000)) - 500;
      run_block(blk);
    end
    checks++;
    if (n_zrl == 0 || n_eob == 0 || n_stall == 0) failures++;
    $display("ZRL %0d, EOB %0d, stalled clocks %0d", n_zrl, n_eob, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
