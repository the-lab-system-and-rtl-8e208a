// Self-checking testbench for color_convert: random and corner colours
// against the conversion formulas evaluated in floating point (within 1
// after clipping to 0..255), and the one-clock latency of out_valid.
module tb_color_convert;
  logic clk = 0, rst = 1, in_valid, out_valid;
  logic [7:0] r, g, b, y, cb, cr;
  int checks = 0, failures = 0;

  color_convert dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clipr(input real v);
    return v < 0.0 ? 0.0 : (v > 255.0 ? 255.0 : v);
  endfunction

  task automatic cmp(input string nm, input logic [7:0] got, input real ref_v);
    real d;
    d = real'(got) - clipr(ref_v);
    checks++;
    if (d > 1.0 || d < -1.0) begin failures++; $display("%s = %0d, reference %f", nm, got, ref_v); end
  endtask

  initial begin
    in_valid = 0; r = 0; g = 0; b = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 3000; t++) begin
      real fr, fg, fb;
      @(negedge clk);
      in_valid = 1;
      if (t < 8) begin r = t[0] ? 8'd255 : 8'd0; g = t[1] ? 8'd255 : 8'd0; b = t[2] ? 8'd255 : 8'd0; end
      else begin r = 8'($urandom); g = 8'($urandom); b = 8'($urandom); end
      fr = real'(r); fg = real'(g); fb = real'(b);
      @(posedge clk); #1;
      checks++;
      if (!out_valid) failures++;
      cmp("Y",  y,   0.299  * fr + 0.587  * fg + 0.114  * fb);
      cmp("Cb", cb, -0.1687 * fr - 0.3313 * fg + 0.5    * fb + 128.0);
      cmp("Cr", cr,  0.5    * fr - 0.4187 * fg - 0.0813 * fb + 128.0);
      @(negedge clk);
      in_valid = 0;
      @(posedge clk); #1;
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
