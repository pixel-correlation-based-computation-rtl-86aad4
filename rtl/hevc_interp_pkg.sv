// Shared types and constants of the HEVC luma fractional interpolator.
//
// The datapath works on 8-bit pixels. Every 8x8 prediction unit (PU) needs a
// 15x15 window of integer pixels (3 before, 4 after, in both directions),
// which gives the 15-pixel bus that feeds 8 interpolation units, each of
// which sees 8 consecutive pixels. The three HEVC luma filter kinds are
// called type A (quarter position), type B (half position) and type C
// (three-quarter position). The schedule of one PU is split into phases;
// the phase tag travels with the results so that they can be routed.
package hevc_interp_pkg;

  localparam int unsigned PIX_W   = 8;             // pixel bit depth
  localparam int unsigned N_UNITS = 8;             // interpolation units = PU width
  localparam int unsigned N_TAPS  = 8;             // filter window
  localparam int unsigned N_BUS   = N_UNITS + N_TAPS - 1;  // 15-pixel bus
  localparam int unsigned N_PLANES = 5;            // pixel kinds per output buffer

  typedef logic [PIX_W-1:0] pixel_t;

  // Filter kind; also the index of the filter inside an interpolation unit,
  // of the transpose memory and of the output buffer it feeds.
  typedef enum logic [1:0] {
    FILT_A = 2'd0,  // -1, 4, -10, 58, 17, -5, 1 on A(-3)..A(3)
    FILT_B = 2'd1,  // -1, 4, -11, 40, 40, -11, 4, -1 on A(-3)..A(4)
    FILT_C = 2'd2   // 1, -5, 17, 58, -10, 4, -1 on A(-2)..A(4)
  } filt_e;

  // Computation reduction mode of the comparison unit.
  typedef enum logic [1:0] {
    RED_OFF  = 2'd0,  // every filter is computed
    RED_PECR = 2'd1,  // skip a filter whose input pixels are all equal
    RED_PSCR = 2'd2   // skip a filter whose input pixels are equal after truncation
  } red_mode_e;

  // Phase of one PU; the order is the issue order.
  typedef enum logic [1:0] {
    PH_ABC = 2'd0,  // 15 rows of the integer window -> a, b, c half pixels
    PH_DHN = 2'd1,  // 8 columns of the integer window -> d, h, n half pixels
    PH_QTR = 2'd2   // 3 x 8 columns of transpose memories -> quarter pixels
  } phase_e;

  // Source of the 15-pixel bus.
  typedef enum logic [1:0] {
    SRC_INT  = 2'd0,  // integer pixel buffer
    SRC_TM_A = 2'd1,  // transpose memory A (a half pixels)
    SRC_TM_B = 2'd2,  // transpose memory B (b half pixels)
    SRC_TM_C = 2'd3   // transpose memory C (c half pixels)
  } src_e;

  // Output buffer planes. Buffer A holds a, d, e, f, g; buffer B holds
  // b, h, i, j, k; buffer C holds c, n, p, q, r (plane index in that order).
  localparam logic [2:0] PL_HORZ = 3'd0;  // a / b / c
  localparam logic [2:0] PL_VERT = 3'd1;  // d / h / n
  localparam logic [2:0] PL_QA   = 3'd2;  // e / i / p (vertical on a)
  localparam logic [2:0] PL_QB   = 3'd3;  // f / j / q (vertical on b)
  localparam logic [2:0] PL_QC   = 3'd4;  // g / k / r (vertical on c)

endpackage
