// Behavioural model of the lab system's main memory as a Wishbone slave,
// for testbenches only. A word-addressed array of 2^AW words; a transfer is
// acknowledged LATENCY clocks after stb rises (3 for on-chip memory, 4 for
// the external one), ack lasts one clock. Byte selects are honoured on
// writes. Addresses wrap modulo the array size. Counts reads and writes.
module wb_mem_model
  import wb_pkg::*;
#(
  parameter int AW      = 16,
  parameter int LATENCY = 3
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t s_i,
  output wb_s2m_t s_o
);

  logic [31:0] mem [2**AW];
  int          wait_cnt;
  int          n_reads, n_writes;
  logic        ack;
  logic [AW-1:0] widx;

  assign widx    = s_i.adr[AW+1:2];
  assign s_o.ack = ack;

  always_ff @(posedge clk) begin
    if (rst) begin
      ack <= 1'b0; wait_cnt <= 0; s_o.dat <= '0; n_reads <= 0; n_writes <= 0;
    end else begin
      ack <= 1'b0;
      if (s_i.cyc && s_i.stb && !ack) begin
        if (wait_cnt + 1 >= LATENCY) begin
          wait_cnt <= 0;
          ack      <= 1'b1;
          if (s_i.we) begin
            for (int b = 0; b < 4; b++)
              if (s_i.sel[b]) mem[widx][8*b +: 8] <= s_i.dat[8*b +: 8];
            n_writes <= n_writes + 1;
          end else begin
            s_o.dat <= mem[widx];
            n_reads <= n_reads + 1;
          end
        end else wait_cnt <= wait_cnt + 1;
      end else wait_cnt <= 0;
    end
  end

endmodule
