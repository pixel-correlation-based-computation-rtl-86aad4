// Comparison unit: decides which of the 3 x N_UNITS filters may be skipped.
//
// The 15 pixels on the source bus are compared pairwise, pixel i with pixel
// i+1, by 14 comparators. In PECR mode the comparators use all 8 bits, so a
// filter is skipped only when its input pixels are identical and the result
// is unchanged. In PSCR mode the trunc_bits (1..4) least significant bits are
// masked first, so a filter is also skipped when its input pixels are merely
// similar; the result then differs slightly from the exact one. In RED_OFF
// mode nothing is skipped.
//
// Unit k sees bus pixels k..k+7. Its type A filter uses pixels k..k+6, its
// type B filter k..k+7 and its type C filter k+1..k+7, and a filter is
// disabled when every comparator inside its span reports a match. The pairing
// of neighbouring pixels is this design's reading of "14 comparators" for a
// 15-pixel bus; a single set of 8-bit comparators with a run-time mask stands
// in for the separate 8..4-bit comparator builds.
//
// Purely combinational.
module comparison_unit
  import hevc_interp_pkg::*;
#(
  parameter int unsigned N_UNITS_P = N_UNITS
) (
  input  pixel_t            row [N_UNITS_P + N_TAPS - 1],
  input  red_mode_e         mode,
  input  logic [2:0]        trunc_bits,
  output logic              dis [N_UNITS_P][3]
);

  localparam int unsigned NB = N_UNITS_P + N_TAPS - 1;

  pixel_t mask;
  logic   eq [NB-1];

  always_comb begin
    unique case (mode)
      RED_PECR: mask = '1;
      RED_PSCR: begin
        unique case (trunc_bits)
          3'd0:    mask = '1;
          3'd1:    mask = 8'hFE;
          3'd2:    mask = 8'hFC;
          3'd3:    mask = 8'hF8;
          default: mask = 8'hF0;
        endcase
      end
      default:  mask = '1;
    endcase
  end

  for (genvar i = 0; i < NB - 1; i++) begin : g_cmp
    assign eq[i] = ((row[i] & mask) == (row[i+1] & mask));
  end

  always_comb begin
    for (int k = 0; k < N_UNITS_P; k++) begin
      logic all_a, all_b, all_c;
      all_a = 1'b1;
      all_c = 1'b1;
      for (int j = 0; j < 6; j++) all_a &= eq[k + j];      // pixels k .. k+6
      for (int j = 1; j < 7; j++) all_c &= eq[k + j];      // pixels k+1 .. k+7
      all_b = all_a & eq[k + 6];                            // pixels k .. k+7
      dis[k][FILT_A] = (mode != RED_OFF) && all_a;
      dis[k][FILT_B] = (mode != RED_OFF) && all_b;
      dis[k][FILT_C] = (mode != RED_OFF) && all_c;
    end
  end

endmodule
