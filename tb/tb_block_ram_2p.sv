// Self-checking testbench for block_ram_2p: writes random words through
// both ports, reads them back through both ports and checks the one-clock
// read latency and the read-first behaviour of a port that writes.
module tb_block_ram_2p;
  localparam int DEPTH = 512;
  logic clk = 0;
  logic a_we, b_we;
  logic [8:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  block_ram_2p #(.DEPTH(DEPTH), .W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill: even addresses through A, odd through B, same cycle
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      a_we = 1; a_addr = 9'(i);     a_wdata = $urandom; model[i] = a_wdata;
      b_we = 1; b_addr = 9'(i + 1); b_wdata = $urandom; model[i+1] = b_wdata;
    end
    @(negedge clk);
    a_we = 0; b_we = 0;
    for (int t = 0; t < 2000; t++) begin
      int ia, ib;
      ia = int'($urandom_range(0, DEPTH-1));
      ib = int'($urandom_range(0, DEPTH-1));
      @(negedge clk);
      a_addr = 9'(ia); b_addr = 9'(ib);
      a_we = (t % 7 == 0); a_wdata = $urandom;
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== model[ia]) failures++;   // read-first: old word
      if (b_rdata !== model[ib] && !(a_we && ia == ib)) failures++;
      if (a_we) model[ia] = a_wdata;
      a_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
