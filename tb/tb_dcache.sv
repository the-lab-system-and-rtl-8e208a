// Self-checking testbench for dcache, run with the store buffer and the bus
// it needs, against a memory model (3 clocks) and a device model in the
// 0x96xx_xxxx window.
//  - Random loads and stores (with byte selects) over twice the cache size,
//    plus uncached ones: every load returns the last value stored there.
//  - Write-through: after the store buffer drains, memory holds every store.
//  - No write allocation: a store to an absent line leaves it absent, the
//    next load misses.
//  - Cacheability: after memory is changed behind the cache, a cached load
//    still returns the old word while a load through the uncached alias
//    (adr[31] = 1) returns the new one.
//  - Counts hits, misses, uncached accesses and store-buffer stalls; each
//    must occur.
module tb_dcache;
  import wb_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  wb_m2s_t cpu_i, dev_o, mem_o;
  wb_s2m_t cpu_o, dev_i, mem_i;
  wb_m2s_t bm [2];
  wb_s2m_t bs [2];
  logic sb_push, sb_full, sb_empty, hit, miss, unc, stall;
  logic [31:0] sb_adr, sb_dat;
  logic [3:0]  sb_sel;
  logic [1:0]  grant;

  dcache dut (.clk, .rst, .cpu_i, .cpu_o, .mem_o(bm[1]), .mem_i(bs[1]),
              .sb_push, .sb_adr, .sb_dat, .sb_sel, .sb_full, .sb_empty,
              .hit_pulse(hit), .miss_pulse(miss), .uncached_pulse(unc), .sb_stall(stall));
  store_buffer #(.DEPTH(4)) u_sb (.clk, .rst, .push(sb_push), .push_adr(sb_adr), .push_dat(sb_dat),
                                  .push_sel(sb_sel), .full(sb_full), .empty(sb_empty),
                                  .m_o(bm[0]), .m_i(bs[0]));
  wb_interconnect #(.NM(2)) u_bus (.clk, .rst, .m_i(bm), .m_o(bs), .mem_o, .mem_i,
                                   .acc_o(dev_o), .acc_i(dev_i), .grant);
  wb_mem_model #(.AW(14), .LATENCY(3)) mem (.clk, .rst, .s_i(mem_o), .s_o(mem_i));
  wb_mem_model #(.AW(8),  .LATENCY(2)) dev (.clk, .rst, .s_i(dev_o), .s_o(dev_i));

  int n_hit = 0, n_miss = 0, n_unc = 0, n_stall = 0;
  always @(posedge clk) begin
    if (hit) n_hit++;
    if (miss) n_miss++;
    if (unc) n_unc++;
    if (stall) n_stall++;
  end

  task automatic access(input logic we, input logic [31:0] adr, input logic [3:0] sel,
                        input logic [31:0] wdat, output logic [31:0] rdat);
    @(negedge clk);
    cpu_i = '{cyc: 1'b1, stb: 1'b1, we: we, sel: sel, adr: adr, dat: wdat};
    do @(posedge clk); while (!cpu_o.ack);
    rdat = cpu_o.dat;
    @(negedge clk);
    cpu_i = WB_M2S_IDLE;
  endtask

  logic [31:0] truth [2**14];
  logic [31:0] dtruth [2**8];

  initial begin
    logic [31:0] d;
    cpu_i = WB_M2S_IDLE;
    for (int i = 0; i < 2**14; i++) begin truth[i] = $urandom; mem.mem[i] = truth[i]; end
    for (int i = 0; i < 2**8; i++)  begin dtruth[i] = $urandom; dev.mem[i] = dtruth[i]; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;

    for (int t = 0; t < 8000; t++) begin
      int kind, w;
      logic [31:0] a, v;
      logic [3:0] s;
      kind = int'($urandom_range(0, 99));
      w    = (t % 3 == 0) ? int'($urandom_range(0, 127)) : int'($urandom_range(0, 4095));
      a    = 32'(w) << 2;
      v    = $urandom;
      s    = 4'($urandom_range(1, 15));
      if (kind < 50) begin
        access(1'b0, a, 4'hf, 32'h0, d);
        checks++;
        if (d !== truth[w]) begin failures++; $display("load %h: %h expected %h", a, d, truth[w]); end
      end else if (kind < 85) begin
        access(1'b1, a, s, v, d);
        for (int b = 0; b < 4; b++) if (s[b]) truth[w][8*b +: 8] = v[8*b +: 8];
      end else if (kind < 92) begin
        access(1'b0, a | 32'h8000_0000, 4'hf, 32'h0, d);   // uncached alias
        checks++;
        if (d !== truth[w]) begin failures++; $display("uncached load %h: %h expected %h", a, d, truth[w]); end
      end else if (kind < 96) begin
        int dw;
        dw = w % 256;
        access(1'b1, 32'h9600_0000 | (32'(dw) << 2), 4'hf, v, d);
        dtruth[dw] = v;
      end else begin
        int dw;
        dw = w % 256;
        access(1'b0, 32'h9600_0000 | (32'(dw) << 2), 4'hf, 32'h0, d);
        checks++;
        if (d !== dtruth[dw]) begin failures++; $display("device load %0d: %h expected %h", dw, d, dtruth[dw]); end
      end
    end

    // a burst of stores fills the store buffer
    for (int i = 0; i < 24; i++) begin
      logic [31:0] v;
      v = $urandom;
      access(1'b1, 32'h0000_2000 + 32'(4*i), 4'hf, v, d);
      truth[2048 + i] = v;
    end

    // write-through: memory holds every store once the buffer is empty
    while (!sb_empty) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int i = 0; i < 2**14; i++) begin
      checks++;
      if (mem.mem[i] !== truth[i]) begin failures++; if (failures < 10) $display("mem[%0d]", i); end
    end

    // no write allocation: line 0x3000 is made absent by a conflicting fill
    begin
      int m0;
      access(1'b0, 32'h0000_1000, 4'hf, 0, d);          // same index as 0x3000 (8 kB apart)
      access(1'b1, 32'h0000_3004, 4'hf, 32'hcafe_f00d, d);
      m0 = n_miss;
      access(1'b0, 32'h0000_3004, 4'hf, 0, d);
      checks += 2;
      if (n_miss != m0 + 1) begin failures++; $display("write miss allocated the line"); end
      if (d !== 32'hcafe_f00d) failures++;
    end

    // cacheability: change memory behind the cache
    access(1'b0, 32'h0000_0040, 4'hf, 0, d);            // now cached
    mem.mem[16] = 32'h1234_5678;
    access(1'b0, 32'h0000_0040, 4'hf, 0, d);
    checks++;
    if (d === 32'h1234_5678) begin failures++; $display("cached load did not use the cache"); end
    access(1'b0, 32'h8000_0040, 4'hf, 0, d);
    checks++;
    if (d !== 32'h1234_5678) begin failures++; $display("uncached load returned %h", d); end

    checks++;
    if (n_hit == 0 || n_miss == 0 || n_unc == 0 || n_stall == 0) failures++;
    $display("hits %0d misses %0d uncached %0d store-buffer stalls %0d", n_hit, n_miss, n_unc, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
