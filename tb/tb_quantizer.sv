// Self-checking testbench for quantizer. The reference divides with integer
// arithmetic: round(b / (4q)) with halves away from zero. Covers every Q
// value of the luminance table, exact halves, zero and the 16-bit extremes.
module tb_quantizer;
  import jpeg_pkg::*;

  dct_out_t            din;
  logic [RECIP_W-1:0]  recip;
  coef_t               dout;
  int checks = 0, failures = 0;

  quantizer dut (.din, .recip, .dout);

  function automatic int ref_q(input int b, input int q);
    int d = 4 * q;
    int m = ((b < 0 ? -b : b) * 2 + d) / (2 * d);
    return b < 0 ? -m : m;
  endfunction

  task automatic check(input int b, input int q);
    din = dct_out_t'(b);
    recip = recip_of(q);
    #1;
    checks++;
    if (int'(dout) != ref_q(b, q)) begin
      failures++;
      if (failures < 10) $display("b=%0d q=%0d got %0d expected %0d", b, q, dout, ref_q(b, q));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(-6112, 16);  // -95.5 -> -96
    check(-152, 11);
    check(-1167, 12);
    check(-122, 14);
    for (int k = 0; k < 8; k++)
      for (int l = 0; l < 8; l++) begin
        int q;
        q = QL[k][l];
        check(2 * q, q);  check(-2 * q, q);        // exact halves
        check(2 * q - 1, q); check(-2 * q + 1, q);
        check(0, q); check(32767, q); check(-32768, q);
        for (int t = 0; t < 200; t++) check(int'($urandom_range(0, 65535)) - 32768, q);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
