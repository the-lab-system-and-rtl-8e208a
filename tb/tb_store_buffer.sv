// Self-checking testbench for store_buffer with a 4-clock memory model.
// Pushes bursts of stores (full stalls the producer), checks that every
// store reaches memory in order with its byte selects, that the buffer
// fills up (full seen) and that empty returns once memory has them all.
module tb_store_buffer;
  import wb_pkg::*;
  logic clk = 0, rst = 1;
  logic push, full, empty;
  logic [31:0] push_adr, push_dat;
  logic [3:0]  push_sel;
  wb_m2s_t m_o;
  wb_s2m_t m_i;
  logic [31:0] model [1024];
  int checks = 0, failures = 0, n_full = 0, n_pushed = 0;
  int order [$];

  store_buffer #(.DEPTH(4)) dut (.*);
  wb_mem_model #(.AW(10), .LATENCY(4)) mem (.clk, .rst, .s_i(m_o), .s_o(m_i));

  always #5 clk = ~clk;

  // record the order in which writes reach memory
  always @(posedge clk) if (!rst && m_i.ack) order.push_back(int'(m_o.adr[11:2]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_order [$];
    push = 0; push_adr = 0; push_dat = 0; push_sel = 0;
    for (int i = 0; i < 1024; i++) begin model[i] = 32'h0; mem.mem[i] = 32'h0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int burst = 0; burst < 40; burst++) begin
      int n;
      n = int'($urandom_range(1, 12));
      for (int i = 0; i < n; i++) begin
        int a;
        a = int'($urandom_range(0, 1023));
        @(negedge clk);
        push = 1; push_adr = 32'(a * 4); push_dat = $urandom; push_sel = 4'($urandom_range(1, 15));
        while (full) begin n_full++; @(negedge clk); end
        for (int b = 0; b < 4; b++) if (push_sel[b]) model[a][8*b +: 8] = push_dat[8*b +: 8];
        expect_order.push_back(a);
        n_pushed++;
      end
      @(negedge clk);
      push = 0;
      repeat (int'($urandom_range(0, 30))) @(negedge clk);
    end
    while (!empty) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      checks++;
      if (mem.mem[i] !== model[i]) begin failures++; $display("word %0d: %h expected %h", i, mem.mem[i], model[i]); end
    end
    checks++;
    if (order.size() != expect_order.size()) failures++;
    else for (int i = 0; i < order.size(); i++) if (order[i] != expect_order[i]) begin failures++; break; end
    checks++;
    if (n_full == 0) begin failures++; $display("store buffer never full"); end
    $display("stores %0d, producer stalled %0d clocks", n_pushed, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
