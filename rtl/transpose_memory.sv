// Transpose memory: ROWS x COLS half pixels of one kind (a, b or c).
//
// During the horizontal phase the interpolation units produce one row of
// COLS half pixels per cycle, written at row wr_row. During the quarter
// pixel phase one column of ROWS half pixels is read per cycle (rd_col) and
// filtered vertically. Write is synchronous, read is combinational. Row in /
// column out is what the memory's name in the design describes; the register
// array form is this implementation's.
module transpose_memory
  import hevc_interp_pkg::*;
#(
  parameter int unsigned ROWS = N_BUS,
  parameter int unsigned COLS = N_UNITS
) (
  input  logic       clk,
  input  logic       wr_en,
  input  logic [3:0] wr_row,
  input  pixel_t     wr_data [COLS],
  input  logic [2:0] rd_col,
  output pixel_t     rd_data [ROWS]
);

  pixel_t mem [ROWS][COLS];

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_row) < ROWS) mem[wr_row] <= wr_data;
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) rd_data[r] = mem[r][rd_col];
  end

endmodule
