// Reference model for the testbenches of the HEVC fractional interpolator.
//
// Works from the HEVC luma filter coefficient tables with plain integer
// multiply-accumulate, independently of the shift-and-add RTL. A filter
// result is round(sum / 64) clipped to 0..255. When reduction is on, a filter
// whose input pixels (the 7 or 8 it multiplies) are all equal after masking
// trunc LSBs returns the pixel of its largest coefficient instead.
package interp_ref_pkg;

  typedef int unsigned pix_t;
  typedef int unsigned win_t [8];

  // coefficient tables over window A(-3)..A(4)
  localparam int COEF [3][8] = '{
    '{-1, 4, -10, 58, 17,  -5,  1,  0},
    '{-1, 4, -11, 40, 40, -11,  4, -1},
    '{ 0, 1,  -5, 17, 58, -10,  4, -1}
  };
  localparam int FIRST [3] = '{0, 0, 1};
  localparam int LAST  [3] = '{6, 7, 7};
  localparam int BYP   [3] = '{3, 3, 4};

  function automatic pix_t fir(int f, win_t w);
    int s = 0;
    for (int i = 0; i < 8; i++) s += COEF[f][i] * int'(w[i]);
    s = s + 32;
    s = (s >= 0) ? s / 64 : -((-s + 63) / 64);   // floor division
    if (s < 0) s = 0;
    if (s > 255) s = 255;
    return pix_t'(s);
  endfunction

  // reduce: 0 off, 1 PECR, 2 PSCR; trunc = LSBs dropped in PSCR
  function automatic bit similar(int f, win_t w, int reduce, int trunc);
    int sh;
    if (reduce == 0) return 1'b0;
    sh = (reduce == 2) ? ((trunc > 4) ? 4 : trunc) : 0;
    for (int i = FIRST[f]; i < LAST[f]; i++)
      if ((w[i] >> sh) != (w[i+1] >> sh)) return 1'b0;
    return 1'b1;
  endfunction

  function automatic pix_t filt(int f, win_t w, int reduce, int trunc, ref int skips);
    if (similar(f, w, reduce, trunc)) begin
      skips++;
      return w[BYP[f]];
    end
    return fir(f, w);
  endfunction

  typedef pix_t pu_in_t  [15][15];        // [row][col], rows/cols -3..11
  typedef pix_t pu_out_t [3][5][8][8];    // [buffer][plane][y][x]

  // Whole PU in the same plane layout as the output buffers.
  function automatic void pu(pu_in_t p, int reduce, int trunc,
                             output pu_out_t o, output int skips);
    pix_t h [3][15][8];
    win_t w;
    skips = 0;
    for (int r = 0; r < 15; r++)
      for (int x = 0; x < 8; x++) begin
        for (int i = 0; i < 8; i++) w[i] = p[r][x+i];
        for (int f = 0; f < 3; f++) h[f][r][x] = filt(f, w, reduce, trunc, skips);
      end
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) o[f][0][y][x] = h[f][y+3][x];
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        for (int i = 0; i < 8; i++) w[i] = p[y+i][x+3];
        for (int f = 0; f < 3; f++) o[f][1][y][x] = filt(f, w, reduce, trunc, skips);
      end
    for (int m = 0; m < 3; m++)
      for (int x = 0; x < 8; x++)
        for (int y = 0; y < 8; y++) begin
          for (int i = 0; i < 8; i++) w[i] = h[m][y+i][x];
          for (int f = 0; f < 3; f++) o[f][2+m][y][x] = filt(f, w, reduce, trunc, skips);
        end
  endfunction

endpackage
