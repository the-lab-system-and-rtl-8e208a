// Direct-mapped instruction cache.
//
// LINES lines of 4 words (16 bytes): the address splits into tag
// (bits 31 .. 4+log2(LINES)), index and a 2-bit word offset. The tag RAM
// holds tag and valid bit per line, the data RAM a 128-bit line, both read
// synchronously like block RAMs. With the default 512 lines the cache holds
// 8 kB (19-bit tags); the 4 kB arrangement has 256 lines and 20-bit tags.
//
// A CPU fetch (cyc & stb) reads both RAMs; the next clock compares the tag.
// On a hit ack is raised with the word. On a miss the whole line is filled
// from memory by four single Wishbone reads (word 0 to 3), written into the
// RAMs, and the requested word is returned. Every address is cacheable.
// Reset clears the valid bits, which are kept in flip-flops. ack is a
// one-clock pulse and is never raised without stb. hit_pulse/miss_pulse
// mark the outcome of each lookup (for statistics).
module icache
  import wb_pkg::*;
#(
  parameter int LINES = 512,
  localparam int IW   = $clog2(LINES),
  localparam int TW   = 32 - IW - 4
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t cpu_i,
  output wb_s2m_t cpu_o,
  output wb_m2s_t mem_o,
  input  wb_s2m_t mem_i,
  output logic    hit_pulse,
  output logic    miss_pulse
);

  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_FILL, S_DONE} state_t;
  state_t state;

  logic [TW-1:0]  tag_ram  [LINES];
  logic [127:0]   data_ram [LINES];
  logic [LINES-1:0] valid;

  logic [TW-1:0]  tag_rd;
  logic [127:0]   line_rd, fill_buf;
  logic [31:0]    req_adr;
  logic [1:0]     fill_w;

  logic [IW-1:0]  req_idx;
  logic [TW-1:0]  req_tag;
  logic           hit;

  assign req_idx = req_adr[IW+3:4];
  assign req_tag = req_adr[31:IW+4];
  assign hit     = valid[req_idx] && tag_rd == req_tag;

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
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      valid  <= '0;
      fill_w <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cpu_i.cyc && cpu_i.stb) begin
                  req_adr <= cpu_i.adr;
                  state   <= S_LOOK;
                end
        S_LOOK: if (hit) state <= S_IDLE;
                else begin state <= S_FILL; fill_w <= '0; end
        S_FILL: if (mem_i.ack) begin
                  fill_buf[32*fill_w +: 32] <= mem_i.dat;
                  fill_w <= fill_w + 2'd1;
                  if (fill_w == 2'd3) begin
                    valid[req_idx] <= 1'b1;
                    state          <= S_DONE;
                  end
                end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_o = WB_M2S_IDLE;
    if (state == S_FILL) begin
      mem_o.cyc = 1'b1;
      mem_o.stb = 1'b1;
      mem_o.sel = 4'hf;
      mem_o.adr = {req_adr[31:4], fill_w, 2'b00};
    end
    cpu_o.ack  = cpu_i.stb && ((state == S_LOOK && hit) || state == S_DONE);
    cpu_o.dat  = line_rd[32*req_adr[3:2] +: 32];
    hit_pulse  = state == S_LOOK && hit;
    miss_pulse = state == S_LOOK && !hit;
  end

endmodule
