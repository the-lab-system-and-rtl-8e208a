// Wishbone (classic, 32-bit) bus types shared by every bus agent in the lab
// system. A master drives a wb_m2s_t bundle and receives a wb_s2m_t bundle.
// A transfer is in progress while cyc and stb are high; the slave ends it
// with a one-cycle ack. The slave must let ack fall together with stb: it
// never keeps ack high into the cycle after the master has dropped stb.
// The address map is the lab system's: addresses whose top byte is 0x96
// select the JPEG accelerator, everything else goes to memory. Only
// addresses below 0x8000_0000 may be held in the data cache.
package wb_pkg;

  typedef struct packed {
    logic        cyc;
    logic        stb;
    logic        we;
    logic [3:0]  sel;
    logic [31:0] adr;
    logic [31:0] dat;
  } wb_m2s_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] dat;
  } wb_s2m_t;

  // Event flags of the lab system, one-clock pulses, for statistics.
  typedef struct packed {
    logic       ic_hit;
    logic       ic_miss;
    logic       dc_hit;
    logic       dc_miss;
    logic       dc_uncached;
    logic       sb_stall;     // a store waits because the store buffer is full
    logic [3:0] bus_grant;    // current bus owner, one-hot
  } sys_events_t;

  localparam wb_m2s_t WB_M2S_IDLE = '{cyc: 1'b0, stb: 1'b0, we: 1'b0, sel: 4'h0,
                                      adr: 32'h0, dat: 32'h0};

  // Accelerator select: stb reaches the accelerator when adr[31:24] == 0x96.
  localparam logic [7:0] ACC_ADR_HI = 8'h96;

  function automatic logic is_acc_adr(input logic [31:0] adr);
    return adr[31:24] == ACC_ADR_HI;
  endfunction

  // Data cache is used only when adr[31] == 0, i.e. adr < 0x8000_0000.
  function automatic logic is_cacheable(input logic [31:0] adr);
    return adr[31] == 1'b0;
  endfunction

endpackage
