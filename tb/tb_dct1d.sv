// Self-checking testbench for dct1d. Compares every output with a
// floating-point evaluation of sqrt(8)*c(k)*sum x cos((2x+1)k pi/16); the
// fixed-point result must lie within 2 LSB of it. Also checks exactly the
// worked example of the reference software: row 1..8 minus 128 gives
// -988 -19 0 -2 0 -1 0 -1.
module tb_dct1d;
  import jpeg_pkg::*;

  dct_in_t  x [8];
  dct_out_t X [8];
  int checks = 0, failures = 0;

  dct1d dut (.x, .X);

  int v [8];

  function automatic real ref_dct(input int k);
    real s;
    s = 0.0;
    for (int i = 0; i < 8; i++)
      s = s + real'(v[i]) * $cos(real'((2*i+1)*k) * 3.14159265358979 / 16.0);
    return (k == 0) ? s : s * $sqrt(2.0);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_row [8] = '{-988, -19, 0, -2, 0, -1, 0, -1};
    for (int i = 0; i < 8; i++) x[i] = dct_in_t'(i + 1 - 128);
    #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (int'(X[k]) != exp_row[k]) begin
        failures++;
        $display("example row: X[%0d]=%0d expected %0d", k, X[k], exp_row[k]);
      end
    end
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 8; i++) begin
        if (t % 3 == 0) v[i] = int'($urandom_range(0, 255)) - 128;
        else if (t % 3 == 1) v[i] = int'($urandom_range(0, 4095)) - 2048;
        else v[i] = (t % 2) ? 2047 : -2048;
        x[i] = dct_in_t'(v[i]);
      end
      #1;
      for (int k = 0; k < 8; k++) begin
        real r;
        r = ref_dct(k);
        checks++;
        if ((real'(X[k]) - r) > 2.0 || (r - real'(X[k])) > 2.0) begin
          failures++;
          if (failures < 10) $display("t=%0d X[%0d]=%0d ref %f", t, k, X[k], r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
