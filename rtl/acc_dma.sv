// DMA engine of the JPEG accelerator: a Wishbone master that fetches one
// 8x8 block of 8-bit pixels from a raster image in memory, lets the DCT
// datapath run, and writes the 64 quantised coefficients back to memory.
//
// Fetch: for row r = 0..7 it reads the two words at src + r*pitch and
// src + r*pitch + 4 (8 pixels, 4 per word) and stores them in words 2r and
// 2r+1 of the accelerator's input RAM. Then it pulses calc_start and waits
// for calc_done. Store: it writes the 32 result words (two 16-bit
// coefficients each, row-major) to dst, dst+4, ..., dst+124; each word is
// first copied from the result memory into a register (one clock), so the
// bus never sees a combinational path through the accelerator. One single
// Wishbone transfer is in flight at a time; cyc and stb stay high until
// ack (cyc drops for one clock between stores). done is a one-cycle pulse
// at the end.
//
// The document only names the DMA; the address/pitch scheme, the order of
// transfers and this interface are this design's own.
module acc_dma
  import wb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // configuration and control
  input  logic        start,
  input  logic [31:0] src,
  input  logic [31:0] pitch,
  input  logic [31:0] dst,
  output logic        busy,
  output logic        done,
  // Wishbone master
  output wb_m2s_t     m_o,
  input  wb_s2m_t     m_i,
  // input RAM write port
  output logic        in_we,
  output logic [3:0]  in_addr,
  output logic [31:0] in_wdata,
  // result read port (combinational)
  output logic [4:0]  out_word,
  input  logic [31:0] out_rdata,
  // datapath handshake
  output logic        calc_start,
  input  logic        calc_done
);

  typedef enum logic [2:0] {D_IDLE, D_READ, D_CALC, D_WAIT, D_LOAD, D_WRITE, D_DONE} dstate_t;
  dstate_t     state;
  logic [4:0]  idx;   // word counter: 0..15 on fetch, 0..31 on store
  logic [31:0] wdat_q;

  assign busy     = (state != D_IDLE);
  assign out_word = idx;

  always_comb begin
    m_o      = WB_M2S_IDLE;
    in_we    = 1'b0;
    in_addr  = idx[3:0];
    in_wdata = m_i.dat;
    if (state == D_READ) begin
      m_o.cyc = 1'b1;
      m_o.stb = 1'b1;
      m_o.sel = 4'hf;
      m_o.adr = src + 32'(idx[3:1]) * pitch + {29'h0, idx[0], 2'b00};
      in_we   = m_i.ack;
    end else if (state == D_WRITE) begin
      m_o.cyc = 1'b1;
      m_o.stb = 1'b1;
      m_o.we  = 1'b1;
      m_o.sel = 4'hf;
      m_o.adr = dst + {25'h0, idx, 2'b00};
      m_o.dat = wdat_q;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= D_IDLE;
      idx        <= '0;
      done       <= 1'b0;
      calc_start <= 1'b0;
    end else begin
      done       <= 1'b0;
      calc_start <= 1'b0;
      unique case (state)
        D_IDLE:  if (start) begin state <= D_READ; idx <= '0; end
        D_READ:  if (m_i.ack) begin
                   if (idx == 5'd15) begin
                     state      <= D_CALC;
                     idx        <= '0;
                   end else idx <= idx + 5'd1;
                 end
        D_CALC:  begin state <= D_WAIT; calc_start <= 1'b1; end
        D_WAIT:  if (calc_done) state <= D_LOAD;
        D_LOAD:  begin wdat_q <= out_rdata; state <= D_WRITE; end
        D_WRITE: if (m_i.ack) begin
                   if (idx == 5'd31) state <= D_DONE;
                   else begin idx <= idx + 5'd1; state <= D_LOAD; end
                 end
        D_DONE:  begin state <= D_IDLE; done <= 1'b1; end
        default: state <= D_IDLE;
      endcase
    end
  end

endmodule
