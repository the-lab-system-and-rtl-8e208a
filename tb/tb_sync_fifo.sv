// Self-checking testbench for sync_fifo: random pushes and pops against a
// queue model; checks data order, full, empty and count, that a push into
// a full FIFO and a pop from an empty one are ignored, and that full and
// empty both occur.
module tb_sync_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst = 1;
  logic write, read, full, empty;
  logic [31:0] data_in, data_out;
  logic [2:0] count;
  logic [31:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  sync_fifo #(.DEPTH(DEPTH), .W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write = 0; read = 0; data_in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks += 3;
      if (empty != (q.size() == 0)) begin failures++; $display("empty wrong at %0d", t); end
      if (full != (q.size() == DEPTH)) begin failures++; $display("full wrong at %0d", t); end
      if (int'(count) != q.size()) failures++;
      if (q.size() > 0) begin
        checks++;
        if (data_out !== q[0]) begin failures++; $display("data %h expected %h", data_out, q[0]); end
      end
      if (full) n_full++;
      if (empty) n_empty++;
      // bias towards filling in the first half, emptying in the second
      write   = ($urandom_range(0, 99) < ((t / 500) % 2 ? 30 : 70));
      read    = ($urandom_range(0, 99) < ((t / 500) % 2 ? 70 : 30));
      data_in = $urandom;
      @(posedge clk);
      begin
        bit was_full, was_empty;
        was_full  = (q.size() == DEPTH);
        was_empty = (q.size() == 0);
        if (read && !was_empty) void'(q.pop_front());
        if (write && !was_full) q.push_back(data_in);
      end
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("full or empty never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
