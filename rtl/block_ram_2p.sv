// True dual-port block RAM: two independent ports, each with a synchronous
// write and a synchronous (registered) read, as the FPGA's block RAMs work.
//
// A read returns the word at addr one clock after the address is presented.
// A write on a port updates the word at the clock edge; that port's read
// data in the same cycle shows the old word (read-first). Writing the same
// address from both ports in one cycle is not allowed (port A wins here).
// The default size is one of the block RAM shapes the FPGA offers, 512x32.
module block_ram_2p #(
  parameter int DEPTH = 512,
  parameter int W     = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we && !(a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
