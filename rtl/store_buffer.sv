// Store (write) buffer between the CPU's data side and memory.
//
// With a write-through data cache every store would cost a memory access
// and stall the CPU. Instead each store (address, data, byte selects) is
// pushed into a FIFO in one clock and the CPU goes on; the buffer drains
// the FIFO in order with single Wishbone write transfers. push is refused
// (full high) while the FIFO is full. empty tells the data cache that every
// earlier store has reached memory, which the cache waits for before it
// reads memory, so a load never overtakes a store.
//
// The document gives the idea and the FIFO of address/data pairs; the
// depth (4) and the interface are this design's own.
module store_buffer
  import wb_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        push,
  input  logic [31:0] push_adr,
  input  logic [31:0] push_dat,
  input  logic [3:0]  push_sel,
  output logic        full,
  output logic        empty,
  output wb_m2s_t     m_o,
  input  wb_s2m_t     m_i
);

  typedef struct packed {
    logic [31:0] adr;
    logic [31:0] dat;
    logic [3:0]  sel;
  } sb_entry_t;

  sb_entry_t head;
  logic      fifo_empty;
  logic [$clog2(DEPTH):0] count;

  sync_fifo #(.DEPTH(DEPTH), .W($bits(sb_entry_t))) u_fifo (
    .clk, .rst,
    .write(push), .data_in({push_adr, push_dat, push_sel}), .full,
    .read(m_i.ack), .data_out(head), .empty(fifo_empty), .count
  );

  assign empty = fifo_empty;

  always_comb begin
    m_o = WB_M2S_IDLE;
    if (!fifo_empty) begin
      m_o.cyc = 1'b1;
      m_o.stb = 1'b1;
      m_o.we  = 1'b1;
      m_o.sel = head.sel;
      m_o.adr = head.adr;
      m_o.dat = head.dat;
    end
  end

endmodule
