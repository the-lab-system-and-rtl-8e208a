// Self-checking testbench for transpose_mem: writes eight rows of random
// values, one row per clock, then reads every column and compares it with
// the written matrix, transposed. Also checks that a read in the cycle of a
// write still sees the old contents, and that t_wr low leaves memory alone.
module tb_transpose_mem;
  logic clk = 0;
  logic t_wr;
  logic [2:0] wr_row, rd_col;
  logic signed [15:0] wr_data [8], rd_data [8];
  logic signed [15:0] m [8][8];
  int checks = 0, failures = 0;

  transpose_mem #(.W(16)) dut (.clk, .t_wr, .wr_row, .wr_data, .rd_col, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t_wr = 0; wr_row = 0; rd_col = 0;
    for (int i = 0; i < 8; i++) wr_data[i] = '0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int r = 0; r < 8; r++) begin
        @(negedge clk);
        t_wr = 1; wr_row = 3'(r);
        for (int j = 0; j < 8; j++) begin
          m[r][j] = 16'($urandom);
          wr_data[j] = m[r][j];
        end
      end
      @(negedge clk);
      t_wr = 0;
      for (int j = 0; j < 8; j++) wr_data[j] = 16'($urandom);  // must be ignored
      @(negedge clk);
      for (int c = 0; c < 8; c++) begin
        rd_col = 3'(c);
        #1;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (rd_data[i] !== m[i][c]) begin
            failures++;
            $display("col %0d row %0d got %0d expected %0d", c, i, rd_data[i], m[i][c]);
          end
        end
      end
      // read-during-write sees old value
      @(negedge clk);
      t_wr = 1; wr_row = 3'd2; rd_col = 3'd5;
      for (int j = 0; j < 8; j++) wr_data[j] = ~m[2][j];
      #1;
      checks++;
      if (rd_data[2] !== m[2][5]) failures++;
      @(posedge clk); #1;
      checks++;
      if (rd_data[2] !== ~m[2][5]) failures++;
      t_wr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
