// 8x8 transpose memory between the row and the column DCT pass.
//
// Writes one whole row per clock (synchronous write, t_wr high, row index
// wr_row) and reads one whole column combinationally (asynchronous read,
// column index rd_col), as a distributed (LUT) RAM does. Writing rows 0..7
// and then reading columns 0..7 turns the row results into column inputs.
// A write and a read in the same cycle see the old contents.
//
// Interface: t_wr, wr_row, wr_data[8] (row element j goes to column j);
// rd_col, rd_data[8] (element i is row i of that column). W is the element
// width; no reset, the contents are written before they are read.
module transpose_mem #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                t_wr,
  input  logic [2:0]          wr_row,
  input  logic signed [W-1:0] wr_data [8],
  input  logic [2:0]          rd_col,
  output logic signed [W-1:0] rd_data [8]
);

  logic signed [W-1:0] mem [8][8];  // [row][column]

  always_ff @(posedge clk) begin
    if (t_wr) begin
      for (int j = 0; j < 8; j++) mem[wr_row][j] <= wr_data[j];
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) rd_data[i] = mem[i][rd_col];
  end

endmodule
