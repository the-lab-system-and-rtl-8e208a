// JPEG accelerator: forward 2-D DCT and quantisation of one 8x8 block of
// 8-bit pixels, attached to the Wishbone bus as a slave (for the CPU) and
// as a master (its DMA).
//
// Datapath. The input RAM is a dual-port block RAM holding the block as 16
// words of 4 pixels (pixel 0 of a row in bits 31:24). Reading words 2r and
// 2r+1 on its two ports gives a whole row of 8 pixels per clock. 128 is
// subtracted from each pixel, the row goes through the 1-D DCT and is
// written into the transpose memory (rows 0..7, 9 clocks with the RAM's read
// latency). Then columns 0..7 are read from the transpose memory, sent
// through the same kind of 1-D DCT (a second instance), registered, divided
// by 4*Q in eight parallel quantiser lanes and written into the result
// memory (9 clocks). So a block takes 18 clocks from start to done.
//
// The result memory holds the 64 coefficients as 16-bit values, read by the
// bus as 32 words in row-major order (coefficient 2i in bits 31:16 of word
// i, coefficient 2i+1 in bits 15:0).
//
// Bus map (offset within the 0x96xx_xxxx window, decoded from adr[11:2]):
//   0x000-0x03C  input RAM, 16 words, write only
//   0x800-0x87C  results, 32 words, read only
//   0xC00        write: bit0 start the DCT on the input RAM, bit1 start the
//                DMA (fetch, DCT, store); read: bit0 done, bit1 busy
//   0xC04/08/0C  DMA source address, source pitch in bytes, destination
// The slave acknowledges every access after one wait state and drops ack
// as soon as stb falls. What the document gives: the split into input RAM,
// two 1-D DCTs with a transpose memory, quantisation, output RAM, the
// 0x96 address window, reading 8 pixels per clock from both RAM ports and
// the ack rule. The register map and the schedule are this design's own.
module jpeg_acc
  import wb_pkg::*;
  import jpeg_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  // Wishbone slave (stb already qualified by the 0x96 window)
  input  wb_m2s_t s_i,
  output wb_s2m_t s_o,
  // Wishbone master (DMA)
  output wb_m2s_t m_o,
  input  wb_s2m_t m_i
);

  // ---------------------------------------------------------------- reciprocals
  typedef logic [RECIP_W-1:0] recip_t;
  function automatic recip_t recip_at(input int k, input int l);
    return recip_of(QL[k][l]);
  endfunction

  // ---------------------------------------------------------------- bus slave
  logic        acc_stb, acc_we_in, acc_we_ctrl, ack;
  logic [1:0]  region;
  logic [31:0] src_q, pitch_q, dst_q;
  logic        done_q;

  assign acc_stb     = s_i.cyc && s_i.stb && !ack;
  assign region      = s_i.adr[11:10];
  assign acc_we_in   = acc_stb && s_i.we && region == 2'b00;
  assign acc_we_ctrl = acc_stb && s_i.we && region == 2'b11;

  // ---------------------------------------------------------------- DMA
  logic        dma_start, dma_busy, dma_done, dma_in_we, dma_calc_start;
  logic [3:0]  dma_in_addr;
  logic [31:0] dma_in_wdata, out_rdata;
  logic [4:0]  dma_out_word;
  logic        calc_done;

  assign dma_start = acc_we_ctrl && s_i.adr[3:2] == 2'd0 && s_i.dat[1] && !dma_busy;

  acc_dma u_dma (
    .clk, .rst,
    .start(dma_start), .src(src_q), .pitch(pitch_q), .dst(dst_q),
    .busy(dma_busy), .done(dma_done),
    .m_o, .m_i,
    .in_we(dma_in_we), .in_addr(dma_in_addr), .in_wdata(dma_in_wdata),
    .out_word(dma_out_word), .out_rdata(out_rdata),
    .calc_start(dma_calc_start), .calc_done(calc_done)
  );

  // ---------------------------------------------------------------- control
  typedef enum logic [1:0] {C_IDLE, C_ROWS, C_COLS} cstate_t;
  cstate_t    cstate;
  logic [3:0] cnt;
  logic       cpu_start, calc_start;

  assign cpu_start  = acc_we_ctrl && s_i.adr[3:2] == 2'd0 && s_i.dat[0] && !dma_busy;
  assign calc_start = (cpu_start || dma_calc_start) && cstate == C_IDLE;

  // ---------------------------------------------------------------- input RAM
  logic        ram_a_we;
  logic [8:0]  ram_a_addr, ram_b_addr;
  logic [31:0] ram_a_wdata, ram_a_rdata, ram_b_rdata;

  always_comb begin
    if (cstate == C_ROWS) begin
      ram_a_we    = 1'b0;
      ram_a_addr  = {5'h0, cnt[2:0], 1'b0};
      ram_a_wdata = '0;
    end else if (dma_busy) begin
      ram_a_we    = dma_in_we;
      ram_a_addr  = {5'h0, dma_in_addr};
      ram_a_wdata = dma_in_wdata;
    end else begin
      ram_a_we    = acc_we_in;
      ram_a_addr  = {5'h0, s_i.adr[5:2]};
      ram_a_wdata = s_i.dat;
    end
    ram_b_addr = {5'h0, cnt[2:0], 1'b1};
  end

  block_ram_2p #(.DEPTH(512), .W(32)) u_inram (
    .clk,
    .a_we(ram_a_we), .a_addr(ram_a_addr), .a_wdata(ram_a_wdata), .a_rdata(ram_a_rdata),
    .b_we(1'b0), .b_addr(ram_b_addr), .b_wdata('0), .b_rdata(ram_b_rdata)
  );

  // ---------------------------------------------------------------- row pass
  dct_in_t  row_in  [8];
  dct_out_t row_out [8];
  logic     [63:0] row_pix;

  assign row_pix = {ram_a_rdata, ram_b_rdata};
  always_comb begin
    for (int i = 0; i < 8; i++)
      row_in[i] = dct_in_t'($signed({4'b0, row_pix[63-8*i -: 8]})) - dct_in_t'(PIX_OFFSET);
  end

  dct1d u_dct_row (.x(row_in), .X(row_out));

  logic       t_wr;
  logic [2:0] t_row;
  dct_out_t   t_rd [8];
  logic [2:0] t_col;

  assign t_wr  = cstate == C_ROWS && cnt != 4'd0;
  assign t_row = 3'(cnt - 4'd1);
  assign t_col = cnt[2:0];

  transpose_mem #(.W(DCT_OUT_W)) u_tmem (
    .clk, .t_wr, .wr_row(t_row), .wr_data(row_out), .rd_col(t_col), .rd_data(t_rd)
  );

  // ---------------------------------------------------------------- column pass
  dct_in_t  col_in  [8];
  dct_out_t col_out [8];
  dct_out_t col_q   [8];
  logic [2:0] col_idx_q;

  always_comb begin
    for (int i = 0; i < 8; i++) col_in[i] = dct_in_t'(t_rd[i]);
  end

  dct1d u_dct_col (.x(col_in), .X(col_out));

  always_ff @(posedge clk) begin
    if (cstate == C_COLS && cnt < 4'd8) begin
      col_q     <= col_out;
      col_idx_q <= cnt[2:0];
    end
  end

  // ---------------------------------------------------------------- quantisation
  recip_t rcp [8];
  coef_t  qout [8];

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      rcp[k] = '0;
      for (int l = 0; l < 8; l++)
        if (col_idx_q == 3'(l)) rcp[k] = recip_at(k, l);
    end
  end

  for (genvar k = 0; k < 8; k++) begin : g_q
    quantizer u_q (.din(col_q[k]), .recip(rcp[k]), .dout(qout[k]));
  end

  // ---------------------------------------------------------------- result memory
  // Stored as [column l][row k]; reading "column" k returns row k of the block.
  logic       o_wr;
  logic [4:0] o_word;
  logic [2:0] o_k;
  coef_t      o_row [8];

  assign o_wr   = cstate == C_COLS && cnt != 4'd0;
  assign o_word = dma_busy ? dma_out_word : s_i.adr[6:2];
  assign o_k    = o_word[4:2];

  transpose_mem #(.W(COEF_W)) u_omem (
    .clk, .t_wr(o_wr), .wr_row(col_idx_q), .wr_data(qout), .rd_col(o_k), .rd_data(o_row)
  );

  assign out_rdata = {o_row[{o_word[1:0], 1'b0}], o_row[{o_word[1:0], 1'b1}]};

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk) begin
    if (rst) begin
      cstate    <= C_IDLE;
      cnt       <= '0;
      calc_done <= 1'b0;
      done_q    <= 1'b0;
    end else begin
      calc_done <= 1'b0;
      unique case (cstate)
        C_IDLE: if (calc_start) begin cstate <= C_ROWS; cnt <= '0; done_q <= 1'b0; end
        C_ROWS: if (cnt == 4'd8) begin cstate <= C_COLS; cnt <= '0; end
                else cnt <= cnt + 4'd1;
        C_COLS: if (cnt == 4'd8) begin
                  cstate    <= C_IDLE;
                  cnt       <= '0;
                  calc_done <= 1'b1;
                  if (!dma_busy) done_q <= 1'b1;
                end else cnt <= cnt + 4'd1;
        default: cstate <= C_IDLE;
      endcase
      if (dma_start) done_q <= 1'b0;
      if (dma_done)  done_q <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- registers, ack
  always_ff @(posedge clk) begin
    if (rst) begin
      ack     <= 1'b0;
      src_q   <= '0;
      pitch_q <= '0;
      dst_q   <= '0;
      s_o.dat <= '0;
    end else begin
      ack <= acc_stb;
      if (acc_we_ctrl) begin
        unique case (s_i.adr[3:2])
          2'd1: src_q   <= s_i.dat;
          2'd2: pitch_q <= s_i.dat;
          2'd3: dst_q   <= s_i.dat;
          default: ;
        endcase
      end
      if (acc_stb && !s_i.we) begin
        unique case (region)
          2'b10:   s_o.dat <= out_rdata;
          2'b11:   s_o.dat <= {30'h0, dma_busy || cstate != C_IDLE, done_q};
          default: s_o.dat <= '0;
        endcase
      end
    end
  end

  assign s_o.ack = ack && s_i.cyc && s_i.stb;

  // ack is never raised without a strobe
  a_ack_needs_stb: assert property (@(posedge clk) disable iff (rst) s_o.ack |-> s_i.stb);

endmodule
