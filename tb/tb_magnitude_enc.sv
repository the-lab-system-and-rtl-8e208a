// Self-checking testbench for magnitude_enc: every 12-bit input is checked
// against the magnitude table (size = the category whose range holds v)
// and against the raw-bit rule (v for positive, v-1 for negative values,
// size bits). Also the values of the worked example: 22 -> 10110,
// 12 -> 1100, 4 -> 100, -12 -> 0011, -8 -> 0111, 1 -> 1.
module tb_magnitude_enc;
  logic signed [11:0] v;
  logic [3:0]  size;
  logic [10:0] bits;
  int checks = 0, failures = 0;

  magnitude_enc dut (.v, .size, .bits);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ex(input int val, input int s, input int b);
    v = 12'(val);
    #1;
    checks++;
    if (int'(size) != s || int'(bits) != b) begin
      failures++;
      $display("%0d -> size %0d bits %b, expected %0d %b", val, size, bits, s, b);
    end
  endtask

  initial begin
    ex(22, 5, 'b10110); ex(12, 4, 'b1100); ex(4, 3, 'b100);
    ex(-12, 4, 'b0011); ex(-8, 4, 'b0111); ex(1, 1, 'b1); ex(0, 0, 0);
    for (int val = -2047; val <= 2047; val++) begin
      int s, lo, hi, raw;
      s = 0;
      for (int c = 1; c <= 11; c++) begin
        lo = 1 << (c - 1); hi = (1 << c) - 1;
        if ((val >= lo && val <= hi) || (val <= -lo && val >= -hi)) s = c;
      end
      raw = (val < 0) ? (val + (1 << s) - 1) : val;   // v-1 in s bits
      ex(val, s, raw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
