// Integer pixel buffer: the N x N integer pixel window of one 8x8 PU.
//
// The whole window (rows and columns -3..11 around the PU) is written in a
// single cycle when load is high, so the next PU can be loaded while the
// interpolation units still work from the transpose memories. The read port
// returns either row rd_idx (horizontal a/b/c filtering) or column rd_idx
// (vertical d/h/n filtering) as an N-pixel bus, combinationally. Loading in
// one cycle and the N = 15 window follow the design; reading columns for the
// vertical filters is this implementation's way of feeding them.
module integer_pixel_buffer
  import hevc_interp_pkg::*;
#(
  parameter int unsigned N = N_BUS
) (
  input  logic       clk,
  input  logic       load,
  input  pixel_t     pix_in [N][N],   // [row][column]
  input  logic       rd_col_mode,     // 0: read a row, 1: read a column
  input  logic [3:0] rd_idx,
  output pixel_t     rd_data [N]
);

  pixel_t mem [N][N];

  always_ff @(posedge clk) begin
    if (load) mem <= pix_in;
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (int'(rd_idx) >= N)  rd_data[i] = '0;
      else if (rd_col_mode)   rd_data[i] = mem[i][rd_idx];
      else                    rd_data[i] = mem[rd_idx][i];
    end
  end

endmodule
