// The lab computer with its JPEG accelerator, minus the CPU and the memory
// chips: instruction cache, write-through data cache with store buffer, the
// shared Wishbone bus and the DCT/quantisation accelerator with its DMA.
//
// The CPU core is outside: its instruction fetch port (cpu_ic_*) and its
// load/store port (cpu_dc_*) are Wishbone-style ports of this module, one
// transfer at a time, ended by a one-clock ack. Main memory is outside too,
// reached through the mem_* Wishbone master port. The events output shows
// cache hits and misses, uncached accesses, store-buffer stalls and the bus
// owner, one-clock pulses meant for statistics.
//
//   cpu_ic -> icache --------------------------.
//   cpu_dc -> dcache (fills, uncached reads) --+-- shared bus --+-- mem_*
//             dcache -> store_buffer ----------+                '-- jpeg_acc (slave)
//   jpeg_acc DMA ------------------------------'                     (0x96xx_xxxx)
//
// Bus priority (lowest index first): store buffer, data cache, instruction
// cache, accelerator DMA. The data cache caches only adr[31] == 0; the
// accelerator's window (0x96xx_xxxx) is therefore never cached, and neither
// is any buffer a DMA engine might write in the upper half.
//
// Beside the computer stand the other JPEG steps the design covers, each
// with its own ports: the colour conversion RGB -> YCbCr (cc_*), the 2x2
// chroma averaging (cs_*) and the entropy coder that turns a block of
// quantised coefficients into Huffman-coded bytes (ec_*). They are not
// on the bus; software or a later stage feeds them.
// The structure follows the document; the bus priority, the port list and
// the cache/buffer sizes where marked in the submodules are this design's.
module lab_system
  import wb_pkg::*;
  import jpeg_pkg::*;
#(
  parameter int IC_LINES = 512,   // 8 kB instruction cache
  parameter int DC_LINES = 512,   // 8 kB data cache
  parameter int SB_DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t cpu_ic_i,
  output wb_s2m_t cpu_ic_o,
  input  wb_m2s_t cpu_dc_i,
  output wb_s2m_t cpu_dc_o,
  output wb_m2s_t mem_o,
  input  wb_s2m_t mem_i,
  output sys_events_t events,
  // colour conversion
  input  logic        cc_in_valid,
  input  logic [7:0]  cc_r,
  input  logic [7:0]  cc_g,
  input  logic [7:0]  cc_b,
  output logic        cc_out_valid,
  output logic [7:0]  cc_y,
  output logic [7:0]  cc_cb,
  output logic [7:0]  cc_cr,
  // chroma subsampling
  input  logic [7:0]  cs_c00,
  input  logic [7:0]  cs_c01,
  input  logic [7:0]  cs_c10,
  input  logic [7:0]  cs_c11,
  output logic [7:0]  cs_c,
  // entropy coder
  input  logic        ec_tbl_we,
  input  logic        ec_tbl_ac,
  input  logic [7:0]  ec_tbl_addr,
  input  logic [4:0]  ec_tbl_len,
  input  logic [15:0] ec_tbl_code,
  input  logic        ec_new_image,
  input  logic        ec_start,
  input  coef_t       ec_coef [64],
  output logic        ec_busy,
  output logic        ec_block_done,
  output logic        ec_out_valid,
  input  logic        ec_out_ready,
  output logic [7:0]  ec_out_byte,
  input  logic        ec_flush,
  output logic        ec_flush_done
);

  localparam int NM = 4;
  localparam int M_SB = 0, M_DC = 1, M_IC = 2, M_DMA = 3;

  wb_m2s_t bus_m2s [NM];
  wb_s2m_t bus_s2m [NM];
  wb_m2s_t acc_s_i;
  wb_s2m_t acc_s_o;
  logic [NM-1:0] grant;

  // events, for statistics in simulation
  logic ic_hit, ic_miss, dc_hit, dc_miss, dc_uncached, dc_sb_stall;

  icache #(.LINES(IC_LINES)) u_icache (
    .clk, .rst,
    .cpu_i(cpu_ic_i), .cpu_o(cpu_ic_o),
    .mem_o(bus_m2s[M_IC]), .mem_i(bus_s2m[M_IC]),
    .hit_pulse(ic_hit), .miss_pulse(ic_miss)
  );

  logic        sb_push, sb_full, sb_empty;
  logic [31:0] sb_adr, sb_dat;
  logic [3:0]  sb_sel;

  dcache #(.LINES(DC_LINES)) u_dcache (
    .clk, .rst,
    .cpu_i(cpu_dc_i), .cpu_o(cpu_dc_o),
    .mem_o(bus_m2s[M_DC]), .mem_i(bus_s2m[M_DC]),
    .sb_push, .sb_adr, .sb_dat, .sb_sel, .sb_full, .sb_empty,
    .hit_pulse(dc_hit), .miss_pulse(dc_miss), .uncached_pulse(dc_uncached),
    .sb_stall(dc_sb_stall)
  );

  store_buffer #(.DEPTH(SB_DEPTH)) u_sb (
    .clk, .rst,
    .push(sb_push), .push_adr(sb_adr), .push_dat(sb_dat), .push_sel(sb_sel),
    .full(sb_full), .empty(sb_empty),
    .m_o(bus_m2s[M_SB]), .m_i(bus_s2m[M_SB])
  );

  assign events = '{ic_hit: ic_hit, ic_miss: ic_miss, dc_hit: dc_hit, dc_miss: dc_miss,
                    dc_uncached: dc_uncached, sb_stall: dc_sb_stall, bus_grant: grant};

  jpeg_acc u_acc (
    .clk, .rst,
    .s_i(acc_s_i), .s_o(acc_s_o),
    .m_o(bus_m2s[M_DMA]), .m_i(bus_s2m[M_DMA])
  );

  wb_interconnect #(.NM(NM)) u_bus (
    .clk, .rst,
    .m_i(bus_m2s), .m_o(bus_s2m),
    .mem_o, .mem_i,
    .acc_o(acc_s_i), .acc_i(acc_s_o),
    .grant
  );

  // ---------------------------------------------------------------- other JPEG steps
  color_convert u_cc (
    .clk, .rst, .in_valid(cc_in_valid), .r(cc_r), .g(cc_g), .b(cc_b),
    .out_valid(cc_out_valid), .y(cc_y), .cb(cc_cb), .cr(cc_cr)
  );

  chroma_subsample u_cs (.c00(cs_c00), .c01(cs_c01), .c10(cs_c10), .c11(cs_c11), .c(cs_c));

  jpeg_entropy_coder u_ec (
    .clk, .rst,
    .tbl_we(ec_tbl_we), .tbl_ac(ec_tbl_ac), .tbl_addr(ec_tbl_addr),
    .tbl_len(ec_tbl_len), .tbl_code(ec_tbl_code),
    .new_image(ec_new_image), .start(ec_start), .coef(ec_coef),
    .busy(ec_busy), .block_done(ec_block_done),
    .out_valid(ec_out_valid), .out_ready(ec_out_ready), .out_byte(ec_out_byte),
    .flush(ec_flush), .flush_done(ec_flush_done)
  );

endmodule
