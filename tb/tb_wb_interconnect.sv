// Self-checking testbench for wb_interconnect: four masters issue random
// reads and writes at the same time, each in its own part of memory and of
// the 0x96xx_xxxx device window. Checks that every read returns what that
// master last wrote, that at most one master is granted at any time, that
// device accesses reach only the device model and memory accesses only the
// memory model, and that masters really had to wait for each other.
module tb_wb_interconnect;
  import wb_pkg::*;
  localparam int NM = 4;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  wb_m2s_t m_i [NM];
  wb_s2m_t m_o [NM];
  wb_m2s_t mem_o, acc_o;
  wb_s2m_t mem_i, acc_i;
  logic [NM-1:0] grant;

  wb_interconnect #(.NM(NM)) dut (.*);
  wb_mem_model #(.AW(12), .LATENCY(3)) mem (.clk, .rst, .s_i(mem_o), .s_o(mem_i));
  wb_mem_model #(.AW(8),  .LATENCY(1)) dev (.clk, .rst, .s_i(acc_o), .s_o(acc_i));

  int n_dev [NM];
  int n_mem [NM];
  int n_wait = 0;
  bit finished [NM];

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (!$onehot0(grant)) begin failures++; $display("grant %b", grant); end
      for (int i = 0; i < NM; i++) if (m_i[i].cyc && !grant[i]) n_wait++;
    end
  end

  for (genvar g = 0; g < NM; g++) begin : g_master
    initial begin
      logic [31:0] shadow_m [256];
      logic [31:0] shadow_d [16];
      n_dev[g] = 0; n_mem[g] = 0; finished[g] = 0;
      m_i[g] = WB_M2S_IDLE;
      for (int i = 0; i < 256; i++) shadow_m[i] = 32'h0;
      for (int i = 0; i < 16; i++) shadow_d[i] = 32'h0;
      for (int i = 0; i < 256; i++) mem.mem[g*256 + i] = 32'h0;
      for (int i = 0; i < 16; i++) dev.mem[g*16 + i] = 32'h0;
      wait (rst == 0);
      for (int t = 0; t < 1500; t++) begin
        bit to_dev, we;
        int w;
        logic [31:0] a, v;
        to_dev = ($urandom_range(0, 3) == 0);
        we     = ($urandom_range(0, 1) == 0);
        w      = to_dev ? int'($urandom_range(0, 15)) : int'($urandom_range(0, 255));
        a      = to_dev ? (32'h9600_0000 | 32'((g*16 + w) * 4)) : 32'((g*256 + w) * 4);
        v      = $urandom;
        @(negedge clk);
        m_i[g] = '{cyc: 1'b1, stb: 1'b1, we: we, sel: 4'hf, adr: a, dat: v};
        do @(posedge clk); while (!m_o[g].ack);
        if (!we) begin
          checks++;
          if (m_o[g].dat !== (to_dev ? shadow_d[w] : shadow_m[w])) begin
            failures++;
            $display("master %0d read %h got %h", g, a, m_o[g].dat);
          end
        end else if (to_dev) shadow_d[w] = v;
        else shadow_m[w] = v;
        if (to_dev) n_dev[g]++; else n_mem[g]++;
        @(negedge clk);
        m_i[g] = WB_M2S_IDLE;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      finished[g] = 1;
    end
  end

  initial begin
    int td, tm;
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    td = 0; tm = 0;
    for (int i = 0; i < NM; i++) begin td += n_dev[i]; tm += n_mem[i]; end
    checks += 3;
    if (dev.n_reads + dev.n_writes != td) begin failures++; $display("device saw %0d of %0d", dev.n_reads + dev.n_writes, td); end
    if (mem.n_reads + mem.n_writes != tm) begin failures++; $display("memory saw %0d of %0d", mem.n_reads + mem.n_writes, tm); end
    if (n_wait == 0) failures++;
    $display("device %0d memory %0d transfers, %0d master-clocks waiting for the bus", td, tm, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
  end
endmodule
