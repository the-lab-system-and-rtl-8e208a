// Self-checking testbench for icache, in the 4 kB arrangement of the
// document's example (256 lines, 20-bit tags) and in the default 8 kB one.
//  - The example line of the document: index 0x67, tag 0x12345, words
//    0x00000000, 0x11111111, 0x22222222, 0x33333333. The first fetch from
//    it misses and fills the line with exactly four memory reads; the other
//    three words then hit with no memory traffic.
//  - Random fetches from a region twice the cache size: every returned word
//    equals memory, hits answer one clock after the request, and both hits
//    and misses (including conflict misses) occur.
module tb_icache;
  import wb_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- two caches, each with its own memory
  wb_m2s_t c4_i, c8_i, m4_o, m8_o;
  wb_s2m_t c4_o, c8_o, m4_i, m8_i;
  logic h4, ms4, h8, ms8;

  icache #(.LINES(256)) dut4 (.clk, .rst, .cpu_i(c4_i), .cpu_o(c4_o), .mem_o(m4_o), .mem_i(m4_i),
                               .hit_pulse(h4), .miss_pulse(ms4));
  icache dut8 (.clk, .rst, .cpu_i(c8_i), .cpu_o(c8_o), .mem_o(m8_o), .mem_i(m8_i),
               .hit_pulse(h8), .miss_pulse(ms8));
  wb_mem_model #(.AW(14), .LATENCY(3)) mem4 (.clk, .rst, .s_i(m4_o), .s_o(m4_i));
  wb_mem_model #(.AW(14), .LATENCY(4)) mem8 (.clk, .rst, .s_i(m8_o), .s_o(m8_i));

  task automatic fetch4(input logic [31:0] adr, output logic [31:0] dat, output int clocks);
    @(negedge clk);
    c4_i = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, sel: 4'hf, adr: adr, dat: 32'h0};
    clocks = 0;
    do begin @(posedge clk); clocks++; end while (!c4_o.ack);
    dat = c4_o.dat;
    @(negedge clk);
    c4_i = WB_M2S_IDLE;
  endtask

  task automatic fetch8(input logic [31:0] adr, output logic [31:0] dat, output int clocks);
    @(negedge clk);
    c8_i = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, sel: 4'hf, adr: adr, dat: 32'h0};
    clocks = 0;
    do begin @(posedge clk); clocks++; end while (!c8_o.ack);
    dat = c8_o.dat;
    @(negedge clk);
    c8_i = WB_M2S_IDLE;
  endtask

  int hits4 = 0, miss4 = 0, hits8 = 0, miss8 = 0;
  always @(posedge clk) begin
    if (h4) hits4++;
    if (ms4) miss4++;
    if (h8) hits8++;
    if (ms8) miss8++;
  end

  initial begin
    logic [31:0] d, base;
    int clk_n, r0;
    c4_i = WB_M2S_IDLE; c8_i = WB_M2S_IDLE;
    for (int i = 0; i < 2**14; i++) begin
      mem4.mem[i] = {16'hc0de, 16'(i)};
      mem8.mem[i] = $urandom;
    end
    // the document's example line: adr = {tag 0x12345, index 0x67, word, 00}
    base = {20'h12345, 8'h67, 4'h0};
    for (int w = 0; w < 4; w++) mem4.mem[(base >> 2) % (2**14) + w] = {4{4'(w), 4'(w)}};
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;

    r0 = mem4.n_reads;
    fetch4(base + 32'd8, d, clk_n);
    checks += 2;
    if (d !== 32'h22222222) begin failures++; $display("example word 2 = %h", d); end
    if (mem4.n_reads - r0 != 4) begin failures++; $display("fill used %0d reads", mem4.n_reads - r0); end
    checks++;
    if (dut4.tag_ram[8'h67] !== 20'h12345) begin failures++; $display("tag %h", dut4.tag_ram[8'h67]); end
    for (int w = 0; w < 4; w++) begin
      r0 = mem4.n_reads;
      fetch4(base + 32'(4*w), d, clk_n);
      checks += 3;
      if (d !== {4{4'(w), 4'(w)}}) failures++;
      if (mem4.n_reads != r0) failures++;
      if (clk_n != 2) begin failures++; $display("hit took %0d clocks", clk_n); end
    end

    // random fetches over twice the cache size
    for (int t = 0; t < 6000; t++) begin
      logic [31:0] a;
      a = 32'($urandom_range(0, 2*4096/4 - 1)) << 2;
      if (t % 2 == 0) a = 32'($urandom_range(0, 255)) << 2;   // a hot loop
      fetch4(a, d, clk_n);
      checks++;
      if (d !== mem4.mem[a[15:2]]) begin failures++; $display("4k: %h -> %h", a, d); end
      a = 32'($urandom_range(0, 2*8192/4 - 1)) << 2;
      if (t % 2 == 0) a = 32'($urandom_range(0, 255)) << 2;
      fetch8(a, d, clk_n);
      checks++;
      if (d !== mem8.mem[a[15:2]]) begin failures++; $display("8k: %h -> %h", a, d); end
    end
    checks++;
    if (hits4 == 0 || miss4 == 0 || hits8 == 0 || miss8 == 0) failures++;
    $display("4 kB: %0d hits %0d misses; 8 kB: %0d hits %0d misses", hits4, miss4, hits8, miss8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
