// End-to-end testbench of lab_system at its default parameters (8 kB
// caches, 4-entry store buffer) with a 3-clock main memory model.
//
// An instruction-fetch process runs a loop of fetches (mostly a hot loop,
// sometimes far away) during the whole test and checks every word. The
// data side acts as the program on the CPU would:
//  1. stores the reference test block (pixels 1..64) into a 512-byte-wide
//     raster image in memory with cacheable stores (store buffer, stalls);
//  2. programs the accelerator's DMA with uncached stores (0x96xx_xxxx),
//     starts it, polls the status register, and reads the 64 coefficients
//     from an uncached result buffer: they must equal the published result;
//  3. shows why the result buffer must not be cached: a cached copy read
//     before the DMA ran is still returned afterwards, the uncached alias
//     returns the new data;
//  4. writes random blocks straight into the accelerator's input RAM,
//     starts it, reads the results through the slave port and compares
//     each with a floating-point DCT and quantisation (within 1);
//  5. re-reads the image (data cache hits).
// Meanwhile the other JPEG steps run side by side: every quantised block
// the accelerator produced above, plus a sparse block with long zero runs,
// goes through the entropy coder (random output stalls) and each byte is
// compared with a bit-level model of zig-zag, run-length and Huffman
// coding; random pixels go through the colour conversion (checked against
// the real-valued formulas, within 1) and the chroma averaging (exact).
// Each mechanism must occur at least once: I-cache hit and miss, D-cache
// hit and miss, uncached access, store-buffer stall, DMA bus ownership, a
// master waiting for the bus, a DMA block and a direct block, a zero-run
// symbol, an end-of-block symbol, a stalled coder output, a colour
// conversion and a chroma average.
module tb_lab_system;
  import wb_pkg::*;
  import jpeg_pkg::*;

  logic clk = 0, rst = 1;
  wb_m2s_t cpu_ic_i, cpu_dc_i, mem_o;
  wb_s2m_t cpu_ic_o, cpu_dc_o, mem_i;
  sys_events_t events;
  int checks = 0, failures = 0;

  logic        cc_in_valid, cc_out_valid;
  logic [7:0]  cc_r, cc_g, cc_b, cc_y, cc_cb, cc_cr;
  logic [7:0]  cs_c00, cs_c01, cs_c10, cs_c11, cs_c;
  logic        ec_tbl_we, ec_tbl_ac, ec_new_image, ec_start, ec_busy, ec_block_done;
  logic        ec_out_valid, ec_out_ready, ec_flush, ec_flush_done;
  logic [7:0]  ec_tbl_addr, ec_out_byte;
  logic [4:0]  ec_tbl_len;
  logic [15:0] ec_tbl_code;
  coef_t       ec_coef [64];

  lab_system dut (.*);
  wb_mem_model #(.AW(16), .LATENCY(3)) mem (.clk, .rst, .s_i(mem_o), .s_o(mem_i));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- statistics
  int n_ic_hit = 0, n_ic_miss = 0, n_dc_hit = 0, n_dc_miss = 0, n_unc = 0, n_stall = 0;
  int n_dma_bus = 0, n_wait = 0, n_dma_blocks = 0, n_direct_blocks = 0, n_stale = 0;
  always @(posedge clk) if (!rst) begin
    if (events.ic_hit) n_ic_hit++;
    if (events.ic_miss) n_ic_miss++;
    if (events.dc_hit) n_dc_hit++;
    if (events.dc_miss) n_dc_miss++;
    if (events.dc_uncached) n_unc++;
    if (events.sb_stall) n_stall++;
    if (events.bus_grant[3]) n_dma_bus++;
    for (int i = 0; i < 4; i++)
      if (dut.bus_m2s[i].cyc && !events.bus_grant[i]) n_wait++;
  end

  // ---------------------------------------------------------------- entropy coder
  int  code_q [$];          // blocks to code, 64 row-major values each
  bit  coder_done = 0;
  int  n_zrl = 0, n_eob = 0, n_ec_stall = 0, n_coded = 0, n_bytes = 0;
  int  ac_len [256], ac_code [256];
  int  dc_len [12] = '{2, 3, 3, 3, 3, 3, 4, 5, 6, 7, 8, 9};
  int  dc_code [12] = '{'b00, 'b010, 'b011, 'b100, 'b101, 'b110, 'b1110, 'b11110,
                        'b111110, 'b1111110, 'b11111110, 'b111111110};
  int  zz_ref [64];
  bit  exp_bits [$];

  function automatic int sz(input int v);
    int m, n;
    m = v < 0 ? -v : v; n = 0;
    while (m != 0) begin n++; m = m >> 1; end
    return n;
  endfunction

  task automatic push_bits(input int v, input int n);
    for (int i = n - 1; i >= 0; i--) exp_bits.push_back(v[i]);
  endtask

  task automatic push_value(input int v);
    push_bits(v < 0 ? v + (1 << sz(v)) - 1 : v, sz(v));
  endtask

  // expected bits of one block: DC difference, then run/size symbols
  task automatic model_block(input int blk [64], inout int prev_dc);
    int seq [64], last, run;
    for (int i = 0; i < 64; i++) seq[i] = blk[zz_ref[i]];
    push_bits(dc_code[sz(seq[0] - prev_dc)], dc_len[sz(seq[0] - prev_dc)]);
    push_value(seq[0] - prev_dc);
    prev_dc = seq[0];
    last = 0;
    for (int i = 1; i < 64; i++) if (seq[i] != 0) last = i;
    run = 0;
    for (int i = 1; i <= last; i++) begin
      if (seq[i] == 0) run++;
      else begin
        while (run >= 16) begin push_bits(ac_code['hF0], ac_len['hF0]); n_zrl++; run -= 16; end
        push_bits(ac_code[run*16 + sz(seq[i])], ac_len[run*16 + sz(seq[i])]);
        push_value(seq[i]);
        run = 0;
      end
    end
    if (last != 63) begin push_bits(ac_code[0], ac_len[0]); n_eob++; end
  endtask

  always @(negedge clk) ec_out_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (!rst && ec_out_valid && !ec_out_ready) n_ec_stall++;
  always @(posedge clk) if (!rst && ec_out_valid && ec_out_ready) begin
    bit b;
    n_bytes++;
    checks++;
    if (exp_bits.size() < 8) begin failures++; $display("coder: extra byte %h", ec_out_byte); end
    else for (int i = 7; i >= 0; i--) begin
      b = exp_bits.pop_front();
      if (ec_out_byte[i] != b) begin failures++; $display("coder: byte %0d = %h wrong", n_bytes, ec_out_byte); break; end
    end
  end

  initial begin
    int k, prev_dc, blk [64];
    ec_tbl_we = 0; ec_tbl_ac = 0; ec_tbl_addr = 0; ec_tbl_len = 0; ec_tbl_code = 0;
    ec_new_image = 0; ec_start = 0; ec_flush = 0;
    for (int i = 0; i < 64; i++) ec_coef[i] = '0;
    k = 0;
    for (int d = 0; d < 15; d++)
      for (int j = 0; j < 8; j++) begin
        int rr;
        rr = (d % 2 == 1) ? j : d - j;
        if (rr >= 0 && rr < 8 && d - rr >= 0 && d - rr < 8) begin zz_ref[k] = rr*8 + d - rr; k++; end
      end
    for (int s = 0; s < 256; s++) begin ac_len[s] = 16; ac_code[s] = 'hC000 | s; end
    ac_len[0] = 4; ac_code[0] = 'b1010;
    ac_len[1] = 2; ac_code[1] = 'b00;
    ac_len[2] = 2; ac_code[2] = 'b01;
    ac_len[3] = 3; ac_code[3] = 'b100;
    ac_len[4] = 4; ac_code[4] = 'b1011;
    // the sparse example block (zero runs of 16 and more)
    for (int i = 0; i < 64; i++) blk[i] = 0;
    blk[0] = 22; blk[1] = 12; blk[3] = -12; blk[10] = -8; blk[16] = 4; blk[31] = 1;
    for (int i = 0; i < 64; i++) code_q.push_back(blk[i]);
    wait (!rst);
    @(negedge clk);
    for (int t = 0; t < 2; t++)
      for (int s = 0; s < (t ? 256 : 12); s++) begin
        ec_tbl_we = 1; ec_tbl_ac = t[0]; ec_tbl_addr = 8'(s);
        ec_tbl_len = 5'(t ? ac_len[s] : dc_len[s]); ec_tbl_code = 16'(t ? ac_code[s] : dc_code[s]);
        @(negedge clk);
      end
    ec_tbl_we = 0;
    ec_new_image = 1; @(negedge clk); ec_new_image = 0;
    prev_dc = 0;
    // 1 example block + 1 DMA block + 6 direct blocks
    while (n_coded < 8) begin
      if (code_q.size() >= 64) begin
        for (int i = 0; i < 64; i++) blk[i] = code_q.pop_front();
        model_block(blk, prev_dc);
        for (int i = 0; i < 64; i++) ec_coef[i] = coef_t'(blk[i]);
        ec_start = 1; @(negedge clk); ec_start = 0;
        while (ec_busy) @(negedge clk);
        n_coded++;
      end else @(negedge clk);
    end
    push_bits(255, (8 - exp_bits.size() % 8) % 8);
    ec_flush = 1; @(negedge clk); ec_flush = 0;
    while (!ec_flush_done) @(negedge clk);
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("coder: %0d bits never sent", exp_bits.size()); end
    coder_done = 1;
  end

  // ---------------------------------------------------------------- colour steps
  int n_cc = 0, n_cs = 0;
  bit colour_done = 0;
  initial begin
    int r, g, b, c [4];
    real ey, ecb, ecr;
    cc_in_valid = 0; cc_r = 0; cc_g = 0; cc_b = 0;
    cs_c00 = 0; cs_c01 = 0; cs_c10 = 0; cs_c11 = 0;
    wait (!rst);
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      r = $urandom_range(0, 255); g = $urandom_range(0, 255); b = $urandom_range(0, 255);
      if (t < 2) begin r = t * 255; g = r; b = r; end
      cc_r = 8'(r); cc_g = 8'(g); cc_b = 8'(b); cc_in_valid = 1;
      @(negedge clk);
      cc_in_valid = 0;
      ey  = 0.299 * r + 0.587 * g + 0.114 * b;
      ecb = -0.1687 * r - 0.3313 * g + 0.5 * b + 128.0;
      ecr = 0.5 * r - 0.4187 * g - 0.0813 * b + 128.0;
      if (ecb > 255.0) ecb = 255.0;
      if (ecr > 255.0) ecr = 255.0;
      checks += 4;
      if (!cc_out_valid) failures++;
      if (real'(cc_y) - ey > 1.0 || ey - real'(cc_y) > 1.0) begin failures++; $display("Y %0d for %f", cc_y, ey); end
      if (real'(cc_cb) - ecb > 1.0 || ecb - real'(cc_cb) > 1.0) begin failures++; $display("Cb %0d for %f", cc_cb, ecb); end
      if (real'(cc_cr) - ecr > 1.0 || ecr - real'(cc_cr) > 1.0) begin failures++; $display("Cr %0d for %f", cc_cr, ecr); end
      n_cc++;
      for (int i = 0; i < 4; i++) c[i] = $urandom_range(0, 255);
      cs_c00 = 8'(c[0]); cs_c01 = 8'(c[1]); cs_c10 = 8'(c[2]); cs_c11 = 8'(c[3]);
      #1;
      checks++;
      if (int'(cs_c) != (c[0] + c[1] + c[2] + c[3] + 2) / 4) failures++;
      n_cs++;
    end
    colour_done = 1;
  end

  // ---------------------------------------------------------------- CPU ports
  task automatic dc_access(input logic we, input logic [31:0] adr, input logic [31:0] wdat,
                           output logic [31:0] rdat);
    @(negedge clk);
    cpu_dc_i = '{cyc: 1'b1, stb: 1'b1, we: we, sel: 4'hf, adr: adr, dat: wdat};
    do @(posedge clk); while (!cpu_dc_o.ack);
    rdat = cpu_dc_o.dat;
    @(negedge clk);
    cpu_dc_i = WB_M2S_IDLE;
  endtask

  task automatic st(input logic [31:0] adr, input logic [31:0] dat);
    logic [31:0] dummy;
    dc_access(1'b1, adr, dat, dummy);
  endtask

  task automatic ld(input logic [31:0] adr, output logic [31:0] dat);
    dc_access(1'b0, adr, 32'h0, dat);
  endtask

  bit data_done = 0;

  // instruction side: fetch and check, until the data side is finished
  initial begin
    cpu_ic_i = WB_M2S_IDLE;
    wait (rst == 0);
    while (!data_done) begin
      logic [31:0] a;
      a = ($urandom_range(0, 19) == 0) ? (32'($urandom_range(0, 8191)) << 2)
                                       : (32'($urandom_range(0, 63)) << 2);
      @(negedge clk);
      cpu_ic_i = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, sel: 4'hf, adr: a, dat: 32'h0};
      do @(posedge clk); while (!cpu_ic_o.ack);
      checks++;
      if (cpu_ic_o.dat !== mem.mem[a[17:2]]) begin
        failures++;
        $display("fetch %h: %h expected %h", a, cpu_ic_o.dat, mem.mem[a[17:2]]);
      end
      @(negedge clk);
      cpu_ic_i = WB_M2S_IDLE;
    end
  end

  // ---------------------------------------------------------------- reference
  int pix [8][8];

  function automatic real ref_q(input int k, input int l);
    real s;
    s = 0.0;
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++)
        s = s + real'(pix[x][y] - 128) * $cos(real'((2*x+1)*k) * 3.14159265358979 / 16.0)
                                       * $cos(real'((2*y+1)*l) * 3.14159265358979 / 16.0);
    if (k != 0) s = s * $sqrt(2.0);
    if (l != 0) s = s * $sqrt(2.0);
    return s / real'(4 * QL[k][l]);
  endfunction

  function automatic logic [31:0] pix_word(input int r, input int half);
    logic [31:0] d;
    for (int b = 0; b < 4; b++) d[31-8*b -: 8] = 8'(pix[r][half*4+b]);
    return d;
  endfunction

  localparam logic [31:0] ACC     = 32'h9600_0000;
  localparam logic [31:0] IMG     = 32'h0002_0000;   // 512-byte-wide raster image
  localparam logic [31:0] RES     = 32'h0003_0000;   // result buffer (cacheable address)
  localparam logic [31:0] RES_UNC = 32'h8003_0000;   // same buffer, uncached

  task automatic wait_done();
    logic [31:0] st_w;
    int n;
    n = 0;
    do begin ld(ACC + 32'hC00, st_w); n++; end while (st_w[0] == 1'b0 && n < 5000);
    checks++;
    if (st_w[0] != 1'b1) begin failures++; $display("accelerator never finished"); end
  endtask

  initial begin
    logic [31:0] d;
    int exp_y [8][8];
    cpu_dc_i = WB_M2S_IDLE;
    for (int i = 0; i < 2**16; i++) mem.mem[i] = $urandom;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // ---- 1: reference block into the image at column 8, rows 0..7
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      pix[r][c] = r*8 + c + 1;
      exp_y[r][c] = 0;
    end
    exp_y[0][0] = -96; exp_y[0][1] = -3; exp_y[1][0] = -24; exp_y[3][0] = -2;
    for (int r = 0; r < 8; r++) for (int h = 0; h < 2; h++)
      st(IMG + 32'(r*512 + 8 + 4*h), pix_word(r, h));

    // ---- 3a: cache a (stale) copy of the first result line
    ld(RES, d);

    // ---- 2: DMA
    st(ACC + 32'hC04, IMG + 32'd8);
    st(ACC + 32'hC08, 32'd512);
    st(ACC + 32'hC0C, RES_UNC);
    st(ACC + 32'hC00, 32'h2);
    wait_done();
    n_dma_blocks++;
    for (int w = 0; w < 32; w++) begin
      ld(RES_UNC + 32'(4*w), d);
      checks += 2;
      code_q.push_back(int'($signed(d[31:16])));
      code_q.push_back(int'($signed(d[15:0])));
      if (int'($signed(d[31:16])) != exp_y[(2*w)/8][(2*w)%8] ||
          int'($signed(d[15:0]))  != exp_y[(2*w+1)/8][(2*w+1)%8]) begin
        failures++;
        $display("DMA result word %0d = %h", w, d);
      end
    end

    // ---- 3b: the cached copy is stale, the uncached alias is not
    begin
      logic [31:0] c0, u0;
      ld(RES, c0);
      ld(RES_UNC, u0);
      checks++;
      if (u0 !== mem.mem[RES[17:2]]) failures++;
      if (c0 !== u0) n_stale++;
    end

    // ---- 4: direct blocks through the slave port
    for (int t = 0; t < 6; t++) begin
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
        pix[r][c] = (t == 0) ? r*8 + c + 1 : int'($urandom_range(0, 255));
      for (int r = 0; r < 8; r++) for (int h = 0; h < 2; h++)
        st(ACC + 32'(8*r + 4*h), pix_word(r, h));
      st(ACC + 32'hC00, 32'h1);
      wait_done();
      n_direct_blocks++;
      for (int w = 0; w < 32; w++) begin
        ld(ACC + 32'h800 + 32'(4*w), d);
        for (int h = 0; h < 2; h++) begin
          int e, k, l, v;
          real f;
          e = 2*w + h; k = e / 8; l = e % 8;
          v = int'($signed(h == 0 ? d[31:16] : d[15:0]));
          code_q.push_back(v);
          checks++;
          if (t == 0) begin
            if (v != exp_y[k][l]) begin failures++; $display("direct ref [%0d][%0d]=%0d", k, l, v); end
          end else begin
            f = ref_q(k, l);
            if (real'(v) - f > 1.0 || f - real'(v) > 1.0) begin
              failures++;
              $display("block %0d [%0d][%0d] = %0d ref %f", t, k, l, v, f);
            end
          end
        end
      end
    end

    // ---- 5: image re-read, twice (second pass hits in the data cache)
    for (int p = 0; p < 2; p++)
      for (int r = 0; r < 8; r++) begin
        ld(IMG + 32'(r*512 + 8), d);
        checks++;
        if (d !== {8'(r*8+1), 8'(r*8+2), 8'(r*8+3), 8'(r*8+4)}) failures++;
      end

    data_done = 1;
    wait (coder_done && colour_done);
    repeat (50) @(posedge clk);

    $display("I-cache hits %0d misses %0d; D-cache hits %0d misses %0d uncached %0d",
             n_ic_hit, n_ic_miss, n_dc_hit, n_dc_miss, n_unc);
    $display("store-buffer stalls %0d; DMA bus clocks %0d; bus waits %0d; DMA blocks %0d; direct blocks %0d; stale cached copies %0d",
             n_stall, n_dma_bus, n_wait, n_dma_blocks, n_direct_blocks, n_stale);
    $display("coded blocks %0d, bytes %0d, ZRL %0d, EOB %0d, coder stalls %0d; colour conversions %0d, chroma averages %0d",
             n_coded, n_bytes, n_zrl, n_eob, n_ec_stall, n_cc, n_cs);
    checks += 16;
    if (n_zrl == 0)      begin failures++; $display("no zero-run symbol"); end
    if (n_eob == 0)      begin failures++; $display("no end-of-block symbol"); end
    if (n_ec_stall == 0) begin failures++; $display("no coder output stall"); end
    if (n_cc == 0)       begin failures++; $display("no colour conversion"); end
    if (n_cs == 0)       begin failures++; $display("no chroma average"); end
    if (n_ic_hit == 0)  begin failures++; $display("no I-cache hit"); end
    if (n_ic_miss == 0) begin failures++; $display("no I-cache miss"); end
    if (n_dc_hit == 0)  begin failures++; $display("no D-cache hit"); end
    if (n_dc_miss == 0) begin failures++; $display("no D-cache miss"); end
    if (n_unc == 0)     begin failures++; $display("no uncached access"); end
    if (n_stall == 0)   begin failures++; $display("no store-buffer stall"); end
    if (n_dma_bus == 0) begin failures++; $display("DMA never owned the bus"); end
    if (n_wait == 0)    begin failures++; $display("no bus contention"); end
    if (n_dma_blocks == 0)    failures++;
    if (n_direct_blocks == 0) failures++;
    if (n_stale == 0)   begin failures++; $display("no stale cached copy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
