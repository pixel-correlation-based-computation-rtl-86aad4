// Result demultiplexer: decides where the 3 x 8 filter results of a cycle go.
//
// The tag (phase, idx) is the one issued a cycle earlier, delayed by the
// controller to line up with the interpolation unit outputs.
//   PH_ABC, idx = row 0..14 of the window (image rows -3..11):
//       type A/B/C results are written as row idx of transpose memory A/B/C;
//       rows 3..10 are the PU's own rows 0..7 and are also written as a row
//       of output buffer plane PL_HORZ (a / b / c).
//   PH_DHN, idx = column 0..7: column idx of plane PL_VERT (d / h / n).
//   PH_QTR, idx = 8*m + column, m = transpose memory A/B/C read: column of
//       plane PL_QA + m (e,i,p from a; f,j,q from b; g,k,r from c).
// Output buffer A always receives type-A results, B type-B, C type-C, so one
// write command serves all three. Combinational.
module result_demux
  import hevc_interp_pkg::*;
(
  input  logic       valid,
  input  phase_e     phase,
  input  logic [4:0] idx,
  output logic       tm_we,        // write the same row into transpose memories A, B, C
  output logic [3:0] tm_row,
  output logic       ob_we,
  output logic [2:0] ob_plane,
  output logic       ob_col_mode,  // 0: row write, 1: column write
  output logic [2:0] ob_idx
);

  always_comb begin
    tm_we       = 1'b0;
    tm_row      = idx[3:0];
    ob_we       = 1'b0;
    ob_plane    = PL_HORZ;
    ob_col_mode = 1'b0;
    ob_idx      = '0;
    if (valid) begin
      unique case (phase)
        PH_ABC: begin
          tm_we = (idx < 5'd15);
          if (idx >= 5'd3 && idx <= 5'd10) begin
            ob_we  = 1'b1;
            ob_idx = 3'(idx - 5'd3);
          end
        end
        PH_DHN: begin
          ob_we       = (idx < 5'd8);
          ob_plane    = PL_VERT;
          ob_col_mode = 1'b1;
          ob_idx      = idx[2:0];
        end
        PH_QTR: begin
          ob_we       = (idx < 5'd24);
          ob_plane    = PL_QA + 3'(idx[4:3]);
          ob_col_mode = 1'b1;
          ob_idx      = idx[2:0];
        end
        default: ;
      endcase
    end
  end

endmodule
