// Self-checking testbench for jpeg_acc.
//  1. The reference software's test block (pixels 1..64) is written through
//     the slave port, the DCT is started, and the 64 quantised coefficients
//     must equal the published result exactly (-96 -3 / -24 / -2, rest 0).
//     The time from start to done must be 18 clocks.
//  2. Random blocks: each coefficient must be within 1 of round(F/(4Q)),
//     F being a floating-point 8*DCT2 of the block minus 128.
//  3. DMA: a block is fetched from a raster image in a memory model with a
//     pitch of 512 bytes and the results are written back to memory; they
//     must equal those read through the slave port for the same block.
module tb_jpeg_acc;
  import wb_pkg::*;
  import jpeg_pkg::*;

  logic clk = 0, rst = 1;
  wb_m2s_t s_i, m_o;
  wb_s2m_t s_o, m_i;
  int checks = 0, failures = 0;

  jpeg_acc dut (.clk, .rst, .s_i, .s_o, .m_o, .m_i);
  wb_mem_model #(.AW(16), .LATENCY(3)) mem (.clk, .rst, .s_i(m_o), .s_o(m_i));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wb_write(input logic [31:0] adr, input logic [31:0] dat);
    @(negedge clk);
    s_i = '{cyc: 1'b1, stb: 1'b1, we: 1'b1, sel: 4'hf, adr: adr, dat: dat};
    do @(posedge clk); while (!s_o.ack);
    @(negedge clk);
    s_i = WB_M2S_IDLE;
  endtask

  task automatic wb_read(input logic [31:0] adr, output logic [31:0] dat);
    @(negedge clk);
    s_i = '{cyc: 1'b1, stb: 1'b1, we: 1'b0, sel: 4'hf, adr: adr, dat: 32'h0};
    do @(posedge clk); while (!s_o.ack);
    dat = s_o.dat;
    @(negedge clk);
    s_i = WB_M2S_IDLE;
  endtask

  int pix [8][8];
  int res [8][8];

  task automatic load_block();
    for (int w = 0; w < 16; w++) begin
      logic [31:0] d;
      for (int b = 0; b < 4; b++) d[31-8*b -: 8] = 8'(pix[w/2][(w%2)*4+b]);
      wb_write(32'h9600_0000 + 32'(4*w), d);
    end
  endtask

  task automatic read_result();
    for (int w = 0; w < 32; w++) begin
      logic [31:0] d;
      wb_read(32'h9600_0800 + 32'(4*w), d);
      res[(2*w)/8][(2*w)%8]     = int'($signed(d[31:16]));
      res[(2*w+1)/8][(2*w+1)%8] = int'($signed(d[15:0]));
    end
  endtask

  task automatic run_dct(output int cycles);
    logic [31:0] st;
    int n;
    @(negedge clk);
    s_i = '{cyc: 1'b1, stb: 1'b1, we: 1'b1, sel: 4'hf, adr: 32'h9600_0C00, dat: 32'h1};
    @(posedge clk);   // start accepted at this edge
    n = 0;
    @(negedge clk);
    s_i = WB_M2S_IDLE;
    while (!dut.done_q) begin @(posedge clk); n++; #1; end
    cycles = n;
    wb_read(32'h9600_0C00, st);
    checks++;
    if (st[1:0] != 2'b01) begin failures++; $display("status %h", st); end
  endtask

  function automatic real ref_coef(input int k, input int l);
    real s;
    real ck, cl;
    s = 0.0;
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++)
        s = s + real'(pix[x][y] - 128) * $cos(real'((2*x+1)*k) * 3.14159265358979 / 16.0)
                                       * $cos(real'((2*y+1)*l) * 3.14159265358979 / 16.0);
    ck = (k == 0) ? 1.0 : $sqrt(2.0);
    cl = (l == 0) ? 1.0 : $sqrt(2.0);
    return s * ck * cl;
  endfunction

  initial begin
    int cyc;
    int exp_y [8][8];
    s_i = WB_M2S_IDLE;
    repeat (3) @(posedge clk);
    rst = 0;

    // ---- 1: published test case
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      pix[r][c] = r*8 + c + 1;
      exp_y[r][c] = 0;
    end
    exp_y[0][0] = -96; exp_y[0][1] = -3; exp_y[1][0] = -24; exp_y[3][0] = -2;
    load_block();
    run_dct(cyc);
    checks++;
    if (cyc != 18) begin failures++; $display("latency %0d clocks, expected 18", cyc); end
    read_result();
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      checks++;
      if (res[r][c] != exp_y[r][c]) begin
        failures++;
        $display("test case [%0d][%0d] = %0d expected %0d", r, c, res[r][c], exp_y[r][c]);
      end
    end

    // ---- 2: random blocks
    for (int t = 0; t < 20; t++) begin
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
        pix[r][c] = (t < 2) ? (t == 0 ? 0 : 255)
                  : (t < 10 ? int'($urandom_range(0, 255))
                            : ((r + c) % 2) * 255);
      load_block();
      run_dct(cyc);
      read_result();
      for (int k = 0; k < 8; k++) for (int l = 0; l < 8; l++) begin
        real f, e;
        f = ref_coef(k, l) / real'(4 * QL[k][l]);
        e = real'(res[k][l]) - f;
        checks++;
        if (e > 1.0 || e < -1.0) begin
          failures++;
          $display("block %0d [%0d][%0d] = %0d ref %f", t, k, l, res[k][l], f);
        end
      end
    end

    // ---- 3: DMA from a 512-byte-wide raster image
    begin
      int ref_res [8][8];
      logic [31:0] st;
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
        pix[r][c] = int'($urandom_range(0, 255));
      load_block();
      run_dct(cyc);
      read_result();
      ref_res = res;
      // place the block at byte 0x1000 + 24 of an image with 512-byte rows
      for (int r = 0; r < 8; r++) for (int w = 0; w < 2; w++) begin
        logic [31:0] d;
        for (int b = 0; b < 4; b++) d[31-8*b -: 8] = 8'(pix[r][w*4+b]);
        mem.mem[(32'h1000 + 24 + r*512 + w*4) / 4] = d;
      end
      wb_write(32'h9600_0C04, 32'h0000_1018);
      wb_write(32'h9600_0C08, 32'd512);
      wb_write(32'h9600_0C0C, 32'h0000_8000);
      wb_write(32'h9600_0C00, 32'h2);
      cyc = 0;
      do begin wb_read(32'h9600_0C00, st); cyc++; end while (st[0] == 1'b0 && cyc < 2000);
      checks++;
      if (st[0] != 1'b1) failures++;
      for (int w = 0; w < 32; w++) begin
        logic [31:0] d;
        d = mem.mem[(32'h8000 / 4) + w];
        checks += 2;
        if (int'($signed(d[31:16])) != ref_res[(2*w)/8][(2*w)%8]) failures++;
        if (int'($signed(d[15:0]))  != ref_res[(2*w+1)/8][(2*w+1)%8]) failures++;
      end
      checks++;
      if (mem.n_reads != 16 || mem.n_writes != 32) begin
        failures++;
        $display("DMA traffic: %0d reads, %0d writes", mem.n_reads, mem.n_writes);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
