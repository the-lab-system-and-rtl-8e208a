// Self-checking testbench for chroma_subsample: random and extreme 2x2
// groups against the rounded mean (sum + 2) / 4.
module tb_chroma_subsample;
  logic [7:0] c00, c01, c10, c11, c;
  int checks = 0, failures = 0;

  chroma_subsample dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int e;
      if (t < 2) begin c00 = t ? 8'd255 : 8'd0; c01 = c00; c10 = c00; c11 = c00; end
      else begin c00 = 8'($urandom); c01 = 8'($urandom); c10 = 8'($urandom); c11 = 8'($urandom); end
      #1;
      e = (int'(c00) + int'(c01) + int'(c10) + int'(c11) + 2) / 4;
      checks++;
      if (int'(c) != e) begin failures++; $display("%0d %0d %0d %0d -> %0d expected %0d", c00, c01, c10, c11, c, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
