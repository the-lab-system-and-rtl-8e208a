// Workload testbench: a whole 512x400 greyscale image (3200 blocks of 8x8)
// goes through lab_system's accelerator by DMA, at the default sizes.
//
// The image is placed in the memory model before reset (a smooth pattern
// with noise; block column 1 of block row 0 holds the reference block
// with pixels 1..64). For each block the CPU data port programs the DMA
// with uncached stores (source = image + 4096*block_row + 8*block_col,
// pitch 512, destination an uncached result buffer), starts it and polls
// the status register. The 64 results are then compared with a
// real-valued DCT and quantisation (within 1), and the reference block
// exactly (-96, -3, -24, -2). The clocks from the start store to the done
// status are counted; the average per block must stay far below the
// 10 000 clocks a block takes in software.
module tb_image_workload;
  import wb_pkg::*;
  import jpeg_pkg::*;

  logic clk = 0, rst = 1;
  wb_m2s_t cpu_ic_i, cpu_dc_i, mem_o;
  wb_s2m_t cpu_ic_o, cpu_dc_o, mem_i;
  sys_events_t events;
  logic        cc_in_valid, cc_out_valid;
  logic [7:0]  cc_r, cc_g, cc_b, cc_y, cc_cb, cc_cr;
  logic [7:0]  cs_c00, cs_c01, cs_c10, cs_c11, cs_c;
  logic        ec_tbl_we, ec_tbl_ac, ec_new_image, ec_start, ec_busy, ec_block_done;
  logic        ec_out_valid, ec_out_ready, ec_flush, ec_flush_done;
  logic [7:0]  ec_tbl_addr, ec_out_byte;
  logic [4:0]  ec_tbl_len;
  logic [15:0] ec_tbl_code;
  coef_t       ec_coef [64];
  int checks = 0, failures = 0;

  localparam int W = 512, H = 400;
  localparam logic [31:0] ACC     = 32'h9600_0000;
  localparam logic [31:0] IMG     = 32'h0000_0000;
  localparam logic [31:0] RES_UNC = 32'h8003_8000;

  lab_system dut (.*);
  wb_mem_model #(.AW(16), .LATENCY(3)) mem (.clk, .rst, .s_i(mem_o), .s_o(mem_i));

  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dc_access(input logic we, input logic [31:0] adr, input logic [31:0] wdat,
                           output logic [31:0] rdat);
    @(negedge clk);
    cpu_dc_i = '{cyc: 1'b1, stb: 1'b1, we: we, sel: 4'hf, adr: adr, dat: wdat};
    do @(posedge clk); while (!cpu_dc_o.ack);
    rdat = cpu_dc_o.dat;
    @(negedge clk);
    cpu_dc_i = WB_M2S_IDLE;
  endtask

  function automatic int pixel(input int x, input int y);
    real v;
    v = 128.0 + 90.0 * $sin(real'(x) / 23.0) * $cos(real'(y) / 17.0) + real'(int'($urandom_range(0, 20)) - 10);
    if (x >= 8 && x < 16 && y < 8) return y * 8 + (x - 8) + 1;
    if (v < 0.0) v = 0.0;
    if (v > 255.0) v = 255.0;
    return int'(v);
  endfunction

  real cs [8][8];   // cs[x][k] = cos((2x+1)k pi/16), times sqrt(2) for k > 0

  initial begin
    logic [31:0] d;
    int img [H][W];
    int total_clocks, max_clocks, n_blocks, t0;
    real rowt [8][8], f;
    logic [7:0] b8;
    cpu_ic_i = WB_M2S_IDLE; cpu_dc_i = WB_M2S_IDLE;
    cc_in_valid = 0; cc_r = 0; cc_g = 0; cc_b = 0;
    cs_c00 = 0; cs_c01 = 0; cs_c10 = 0; cs_c11 = 0;
    ec_tbl_we = 0; ec_tbl_ac = 0; ec_tbl_addr = 0; ec_tbl_len = 0; ec_tbl_code = 0;
    ec_new_image = 0; ec_start = 0; ec_out_ready = 1; ec_flush = 0;
    for (int i = 0; i < 64; i++) ec_coef[i] = '0;
    for (int x = 0; x < 8; x++) for (int k = 0; k < 8; k++)
      cs[x][k] = $cos(real'((2*x+1)*k) * 3.14159265358979 / 16.0) * (k == 0 ? 1.0 : $sqrt(2.0));
    for (int i = 0; i < 2**16; i++) mem.mem[i] = '0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      img[y][x] = pixel(x, y);
      b8 = 8'(img[y][x]);
      mem.mem[(y*W + x) / 4][31 - 8*(x % 4) -: 8] = b8;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    dc_access(1'b1, ACC + 32'hC08, 32'(W), d);
    dc_access(1'b1, ACC + 32'hC0C, RES_UNC, d);
    total_clocks = 0; max_clocks = 0; n_blocks = 0;
    for (int by = 0; by < H / 8; by++)
      for (int bx = 0; bx < W / 8; bx++) begin
        dc_access(1'b1, ACC + 32'hC04, IMG + 32'(by * 8 * W + bx * 8), d);
        t0 = $time / 10;
        dc_access(1'b1, ACC + 32'hC00, 32'h2, d);
        do dc_access(1'b0, ACC + 32'hC00, 32'h0, d); while (d[0] == 1'b0 && $time / 10 - t0 < 5000);
        t0 = $time / 10 - t0;
        total_clocks += t0;
        if (t0 > max_clocks) max_clocks = t0;
        n_blocks++;
        // reference: rows, then columns, then divide by 4Q
        for (int r = 0; r < 8; r++) for (int l = 0; l < 8; l++) begin
          rowt[r][l] = 0.0;
          for (int c = 0; c < 8; c++) rowt[r][l] += real'(img[by*8 + r][bx*8 + c] - 128) * cs[c][l];
        end
        for (int k = 0; k < 8; k++) for (int l = 0; l < 8; l++) begin
          int e, v;
          f = 0.0;
          for (int r = 0; r < 8; r++) f += rowt[r][l] * cs[r][k];
          f = f / real'(4 * QL[k][l]);
          e = k * 8 + l;
          d = mem.mem[RES_UNC[17:2] + 16'(e / 2)];
          v = int'($signed(e % 2 == 0 ? d[31:16] : d[15:0]));
          checks++;
          if (by == 0 && bx == 1) begin
            int ex;
            ex = (e == 0) ? -96 : (e == 1) ? -3 : (e == 8) ? -24 : (e == 24) ? -2 : 0;
            if (v != ex) begin failures++; $display("reference block [%0d][%0d] = %0d", k, l, v); end
          end else if (real'(v) - f > 1.0 || f - real'(v) > 1.0) begin
            failures++;
            if (failures < 10) $display("block (%0d,%0d) [%0d][%0d] = %0d, reference %f", by, bx, k, l, v, f);
          end
        end
      end
    checks += 2;
    if (n_blocks != 3200) failures++;
    if (total_clocks / n_blocks >= 10000) failures++;
    $display("blocks %0d, accelerator clocks per block: average %0d, worst %0d, total %0d",
             n_blocks, total_clocks / n_blocks, max_clocks, total_clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
