// Output buffer: PLANES kinds of fractional pixels of one 8x8 PU, all made by
// one filter type (buffer A: a, d, e, f, g; B: b, h, i, j, k; C: c, n, p, q, r).
//
// Each write stores 8 pixels, as row idx (horizontal phase) or as column idx
// (vertical phases) of the given plane. The read port returns row rd_row of
// plane rd_plane combinationally. Contents stay until overwritten by the next
// PU's results. Storage layout and read port are this implementation's.
module output_buffer
  import hevc_interp_pkg::*;
#(
  parameter int unsigned PLANES = N_PLANES,
  parameter int unsigned DIM    = N_UNITS
) (
  input  logic       clk,
  input  logic       we,
  input  logic [2:0] plane,
  input  logic       col_mode,
  input  logic [2:0] idx,
  input  pixel_t     wr_data [DIM],
  input  logic [2:0] rd_plane,
  input  logic [2:0] rd_row,
  output pixel_t     rd_data [DIM]
);

  pixel_t mem [PLANES][DIM][DIM];   // [plane][row][column]

  always_ff @(posedge clk) begin
    if (we && int'(plane) < PLANES) begin
      for (int i = 0; i < DIM; i++) begin
        if (col_mode) mem[plane][i][idx] <= wr_data[i];
        else          mem[plane][idx][i] <= wr_data[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < DIM; i++)
      rd_data[i] = (int'(rd_plane) < PLANES) ? mem[rd_plane][rd_row][i] : '0;
  end

endmodule
