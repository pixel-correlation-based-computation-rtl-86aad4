// Source multiplexer of the N-pixel bus that feeds the interpolation units
// and the comparison unit: the integer pixel buffer (a/b/c and d/h/n phases)
// or one of the transpose memories A, B, C (quarter pixel phase).
// Combinational.
module source_mux
  import hevc_interp_pkg::*;
#(
  parameter int unsigned N = N_BUS
) (
  input  src_e   sel,
  input  pixel_t int_data [N],
  input  pixel_t tm_a [N],
  input  pixel_t tm_b [N],
  input  pixel_t tm_c [N],
  output pixel_t row [N]
);

  always_comb begin
    unique case (sel)
      SRC_INT:  row = int_data;
      SRC_TM_A: row = tm_a;
      SRC_TM_B: row = tm_b;
      default:  row = tm_c;
    endcase
  end

endmodule
