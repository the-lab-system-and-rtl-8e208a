// Direct-mapped, write-through data cache with no write allocation, placed
// in front of a store buffer.
//
// Geometry as the instruction cache: LINES lines of 4 words, tag RAM and
// 128-bit data RAM read synchronously; 512 lines (8 kB) by default. Only
// addresses with adr[31] == 0 (below 0x8000_0000) are cached; the upper
// half, where the accelerator and other devices live, is never cached, so
// data that a DMA engine writes to memory is seen there.
//
// Policy:
//   read hit        word from the cache (ack one clock after the request)
//   read miss       wait until the store buffer is empty, fill the line
//                   with four single reads, return the word
//   uncached read   wait until the store buffer is empty, one single read
//   write hit       update the bytes in the cache and push the store into
//                   the store buffer
//   write miss      push the store into the store buffer only
//   uncached write  push the store into the store buffer only
// A write is acknowledged as soon as the store buffer accepts it; it stalls
// only while the buffer is full. ack is a one-clock pulse, never without
// stb. The *_pulse outputs mark each outcome once (for statistics).
module dcache
  import wb_pkg::*;
#(
  parameter int LINES = 512,
  localparam int IW   = $clog2(LINES),
  localparam int TW   = 32 - IW - 4
) (
  input  logic        clk,
  input  logic        rst,
  input  wb_m2s_t     cpu_i,
  output wb_s2m_t     cpu_o,
  // line fills and uncached reads
  output wb_m2s_t     mem_o,
  input  wb_s2m_t     mem_i,
  // store buffer
  output logic        sb_push,
  output logic [31:0] sb_adr,
  output logic [31:0] sb_dat,
  output logic [3:0]  sb_sel,
  input  logic        sb_full,
  input  logic        sb_empty,
  // events
  output logic        hit_pulse,
  output logic        miss_pulse,
  output logic        uncached_pulse,
  output logic        sb_stall
);

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_WAIT_SB, S_FILL, S_UNC, S_DONE} state_t;
  state_t state;

  logic [TW-1:0]  tag_ram  [LINES];
  logic [127:0]   data_ram [LINES];
  logic [LINES-1:0] valid;

  logic [TW-1:0]  tag_rd;
  logic [127:0]   line_rd, fill_buf;
  logic [31:0]    req_adr, unc_dat;
  logic [1:0]     fill_w;

  logic [IW-1:0]  req_idx;
  logic [TW-1:0]  req_tag;
  logic           cacheable, hit, wr_req;

  assign req_idx   = req_adr[IW+3:4];
  assign req_tag   = req_adr[31:IW+4];
  assign cacheable = is_cacheable(req_adr);
  assign hit       = cacheable && valid[req_idx] && tag_rd == req_tag;
  assign wr_req    = cpu_i.we;

  // RAMs: synchronous read of the requested line, line write on fill, byte
  // write on a write hit.
  always_ff @(posedge clk) begin
    if (state == S_IDLE) begin
      tag_rd  <= tag_ram[cpu_i.adr[IW+3:4]];
      line_rd <= data_ram[cpu_i.adr[IW+3:4]];
    end
    if (state == S_FILL && mem_i.ack && fill_w == 2'd3) begin
      tag_ram[req_idx]  <= req_tag;
      data_ram[req_idx] <= {mem_i.dat, fill_buf[95:0]};
      line_rd           <= {mem_i.dat, fill_buf[95:0]};
    end
    if (state == S_LOOK && wr_req && hit && !sb_full) begin
      for (int b = 0; b < 4; b++)
        if (cpu_i.sel[b]) data_ram[req_idx][32*req_adr[3:2] + 8*b +: 8] <= cpu_i.dat[8*b +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      valid  <= '0;
      fill_w <= '0;
    end else begin
      unique case (state)
        S_IDLE:    if (cpu_i.cyc && cpu_i.stb) begin
                     req_adr <= cpu_i.adr;
                     state   <= S_LOOK;
                   end
        S_LOOK:    if (wr_req) begin
                     if (!sb_full) state <= S_IDLE;
                   end else if (hit) state <= S_IDLE;
                   else state <= S_WAIT_SB;
        S_WAIT_SB: if (sb_empty) begin
                     state  <= cacheable ? S_FILL : S_UNC;
                     fill_w <= '0;
                   end
        S_FILL:    if (mem_i.ack) begin
                     fill_buf[32*fill_w +: 32] <= mem_i.dat;
                     fill_w <= fill_w + 2'd1;
                     if (fill_w == 2'd3) begin
                       valid[req_idx] <= 1'b1;
                          state          <= S_DONE;
                     end
                   end
        S_UNC:     if (mem_i.ack) begin
                     unc_dat <= mem_i.dat;
                     state   <= S_DONE;
                   end
        S_DONE:    state <= S_IDLE;
        default:   state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_o = WB_M2S_IDLE;
    if (state == S_FILL || state == S_UNC) begin
      mem_o.cyc = 1'b1;
      mem_o.stb = 1'b1;
      mem_o.sel = (state == S_FILL) ? 4'hf : cpu_i.sel;
      mem_o.adr = (state == S_FILL) ? {req_adr[31:4], fill_w, 2'b00} : req_adr;
    end
    sb_push = state == S_LOOK && wr_req && !sb_full;
    sb_adr  = req_adr;
    sb_dat  = cpu_i.dat;
    sb_sel  = cpu_i.sel;
    cpu_o.ack = cpu_i.stb && ((state == S_LOOK && (wr_req ? !sb_full : hit)) || state == S_DONE);
    cpu_o.dat = cacheable ? line_rd[32*req_adr[3:2] +: 32] : unc_dat;
    hit_pulse      = state == S_LOOK && !wr_req && hit;
    miss_pulse     = state == S_LOOK && !wr_req && cacheable && !hit;
    uncached_pulse = state == S_LOOK && !cacheable;
    sb_stall       = state == S_LOOK && wr_req && sb_full;
  end

endmodule
