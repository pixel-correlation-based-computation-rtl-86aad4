// HEVC luma 8-tap interpolation filter, one of three kinds.
//
// FTYPE selects the coefficient set:
//   FILT_A  -1  4 -10 58 17  -5  1     on taps 0..6 (A(-3)..A(3)), quarter position
//   FILT_B  -1  4 -11 40 40 -11  4 -1  on taps 0..7 (A(-3)..A(4)), half position
//   FILT_C       1  -5 17 58 -10 4 -1  on taps 1..7 (A(-2)..A(4)), three-quarter position
// The constant multiplications are written as shifts and adds, the form in
// which the computation reduction is counted. The coefficients add up to 64,
// so the sum is rounded (+32), shifted right by 6 and clipped to 0..255: the
// result is again an 8-bit pixel that the next filtering stage and the
// comparators can use, and a window of equal pixels gives that pixel back
// exactly. The coefficient sets follow the HEVC standard; the rounding and
// clipping to 8 bits are this design's reading of the normalisation step.
//
// Purely combinational; the caller registers the taps.
module hevc_fir
  import hevc_interp_pkg::*;
#(
  parameter filt_e FTYPE = FILT_A
) (
  input  pixel_t taps [N_TAPS],
  output pixel_t result
);

  typedef logic signed [15:0] acc_t;

  acc_t t [N_TAPS];
  acc_t sum;
  acc_t rnd;

  always_comb begin
    for (int i = 0; i < N_TAPS; i++) t[i] = acc_t'({8'd0, taps[i]});
    unique case (FTYPE)
      FILT_A: // -x0 + 4x1 - 10x2 + 58x3 + 17x4 - 5x5 + x6
        sum = - t[0] + (t[1] <<< 2) - ((t[2] <<< 3) + (t[2] <<< 1))
              + ((t[3] <<< 6) - (t[3] <<< 2) - (t[3] <<< 1))
              + ((t[4] <<< 4) + t[4]) - ((t[5] <<< 2) + t[5]) + t[6];
      FILT_B: // -x0 + 4x1 - 11x2 + 40x3 + 40x4 - 11x5 + 4x6 - x7
        sum = - t[0] + (t[1] <<< 2) - ((t[2] <<< 3) + (t[2] <<< 1) + t[2])
              + ((t[3] <<< 5) + (t[3] <<< 3)) + ((t[4] <<< 5) + (t[4] <<< 3))
              - ((t[5] <<< 3) + (t[5] <<< 1) + t[5]) + (t[6] <<< 2) - t[7];
      default: // FILT_C: x1 - 5x2 + 17x3 + 58x4 - 10x5 + 4x6 - x7
        sum = t[1] - ((t[2] <<< 2) + t[2]) + ((t[3] <<< 4) + t[3])
              + ((t[4] <<< 6) - (t[4] <<< 2) - (t[4] <<< 1))
              - ((t[5] <<< 3) + (t[5] <<< 1)) + (t[6] <<< 2) - t[7];
    endcase
    rnd = (sum + acc_t'(32)) >>> 6;
    if (rnd < 0)             result = '0;
    else if (rnd > 16'sd255) result = '1;
    else                     result = rnd[PIX_W-1:0];
  end

endmodule
