// Synchronous FIFO built from a small RAM plus a read counter and a write
// counter, with full and empty flags.
//
// write with data_in stores a word unless the FIFO is full; read removes
// the oldest word unless it is empty. data_out always shows the oldest word
// (first-word fall-through: the RAM is read asynchronously, as distributed
// RAM is). Both counters carry one extra bit so that full and empty can be
// told apart when they point at the same word. Writing and reading in the
// same cycle is allowed. Reset empties the FIFO.
module sync_fifo #(
  parameter int DEPTH = 4,
  parameter int W     = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         write,
  input  logic [W-1:0] data_in,
  output logic         full,
  input  logic         read,
  output logic [W-1:0] data_out,
  output logic         empty,
  output logic [AW:0]  count
);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wr_cnt, rd_cnt;
  logic         do_wr, do_rd;

  assign count    = wr_cnt - rd_cnt;
  assign empty    = (count == '0);
  assign full     = (count == (AW+1)'(DEPTH));
  assign do_wr    = write && !full;
  assign do_rd    = read && !empty;
  assign data_out = mem[rd_cnt[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_cnt[AW-1:0]] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_cnt <= '0;
      rd_cnt <= '0;
    end else begin
      if (do_wr) wr_cnt <= wr_cnt + 1'b1;
      if (do_rd) rd_cnt <= rd_cnt + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));

endmodule
