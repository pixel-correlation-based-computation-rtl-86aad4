// HEVC luma fractional interpolation of one 8x8 prediction unit with
// pixel-correlation based filter skipping.
//
// For every integer pixel of the PU the 15 fractional positions are produced:
// half pixels a, b, c (horizontal), d, h, n (vertical) and quarter pixels
// e..r (vertical filtering of a, b, c). Eight interpolation units, each with
// a type A, B and C filter, work on 8 output positions in parallel; a
// 15-pixel bus feeds them, taken from the integer pixel buffer (rows for
// a/b/c, columns for d/h/n) or from the transpose memories that hold the
// 15 x 8 a, b, c half pixels (columns for the quarter pixels). A comparison
// unit looks at the same bus and disables any filter whose input pixels are
// equal (PECR) or equal after truncating 1..4 LSBs (PSCR); a disabled filter
// keeps its input registers and the unit outputs its largest-coefficient
// input pixel instead.
//
// Interface: pulse start while ready is high; pix_in (rows/columns -3..11
// of the PU, [row][column]) is loaded in that cycle, and mode / trunc_bits
// are sampled then. 48 cycles later (load + 47 issue cycles, results one
// cycle behind) done pulses and the output buffers hold the PU; read them a
// row at a time with rd_plane / rd_row (buffer A: a,d,e,f,g; B: b,h,i,j,k;
// C: c,n,p,q,r). ready is high again in the cycle the last results are
// written, so PUs can follow each other every 48 cycles; the output buffers
// are then overwritten from the second cycle after the new start. skip_cnt
// counts the filter evaluations skipped in the last finished PU (out of
// 47 x 24); it changes in the cycle done rises.
module hevc_frac_interp
  import hevc_interp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output logic      ready,
  output logic      done,
  input  pixel_t    pix_in [N_BUS][N_BUS],
  input  red_mode_e mode,
  input  logic [2:0] trunc_bits,
  input  logic [2:0] rd_plane,
  input  logic [2:0] rd_row,
  output pixel_t    rd_a [N_UNITS],
  output pixel_t    rd_b [N_UNITS],
  output pixel_t    rd_c [N_UNITS],
  output logic [15:0] skip_cnt
);

  // ---------------- control
  logic       load, issue, int_col_mode, res_valid;
  phase_e     res_phase;
  logic [4:0] res_idx;
  src_e       src_sel;
  logic [3:0] int_idx;
  logic [2:0] tm_col;

  interp_controller u_ctrl (
    .clk, .rst_n, .start, .ready, .load, .done,
    .issue, .phase (), .idx (), .src_sel, .int_col_mode, .int_idx, .tm_col,
    .res_valid, .res_phase, .res_idx
  );

  red_mode_e  mode_q;
  logic [2:0] trunc_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_q  <= RED_OFF;
      trunc_q <= '0;
    end else if (load) begin
      mode_q  <= mode;
      trunc_q <= trunc_bits;
    end
  end

  // ---------------- sources
  pixel_t int_row [N_BUS];
  pixel_t tm_rd [3][N_BUS];
  pixel_t bus [N_BUS];

  integer_pixel_buffer u_ibuf (
    .clk, .load, .pix_in,
    .rd_col_mode (int_col_mode),
    .rd_idx      (int_idx),
    .rd_data     (int_row)
  );

  source_mux u_mux (
    .sel (src_sel), .int_data (int_row),
    .tm_a (tm_rd[FILT_A]), .tm_b (tm_rd[FILT_B]), .tm_c (tm_rd[FILT_C]),
    .row (bus)
  );

  // ---------------- comparison and interpolation
  logic   dis [N_UNITS][3];
  pixel_t res [3][N_UNITS];     // [filter type][unit]
  logic   skp [N_UNITS][3];

  comparison_unit u_cmp (
    .row (bus), .mode (mode_q), .trunc_bits (trunc_q), .dis
  );

  for (genvar k = 0; k < N_UNITS; k++) begin : g_unit
    pixel_t win [N_TAPS];
    pixel_t op  [3];
    for (genvar t = 0; t < N_TAPS; t++) begin : g_win
      assign win[t] = bus[k + t];
    end
    interp_unit u_iu (
      .clk, .rst_n, .en (issue), .win, .dis (dis[k]),
      .out_pix (op), .out_skip (skp[k])
    );
    for (genvar f = 0; f < 3; f++) begin : g_res
      assign res[f][k] = op[f];
    end
  end

  // ---------------- result routing
  logic       tm_we, ob_we, ob_col_mode;
  logic [3:0] tm_row;
  logic [2:0] ob_plane, ob_idx;

  result_demux u_demux (
    .valid (res_valid), .phase (res_phase), .idx (res_idx),
    .tm_we, .tm_row, .ob_we, .ob_plane, .ob_col_mode, .ob_idx
  );

  for (genvar f = 0; f < 3; f++) begin : g_tm
    transpose_memory u_tm (
      .clk, .wr_en (tm_we), .wr_row (tm_row), .wr_data (res[f]),
      .rd_col (tm_col), .rd_data (tm_rd[f])
    );
  end

  output_buffer u_obuf_a (
    .clk, .we (ob_we), .plane (ob_plane), .col_mode (ob_col_mode), .idx (ob_idx),
    .wr_data (res[FILT_A]), .rd_plane, .rd_row, .rd_data (rd_a)
  );
  output_buffer u_obuf_b (
    .clk, .we (ob_we), .plane (ob_plane), .col_mode (ob_col_mode), .idx (ob_idx),
    .wr_data (res[FILT_B]), .rd_plane, .rd_row, .rd_data (rd_b)
  );
  output_buffer u_obuf_c (
    .clk, .we (ob_we), .plane (ob_plane), .col_mode (ob_col_mode), .idx (ob_idx),
    .wr_data (res[FILT_C]), .rd_plane, .rd_row, .rd_data (rd_c)
  );

  // ---------------- skipped-evaluation counter
  logic [4:0] skp_now;
  always_comb begin
    skp_now = '0;
    for (int k = 0; k < N_UNITS; k++)
      for (int f = 0; f < 3; f++) skp_now += 5'(skp[k][f]);
  end

  // The accumulator restarts with the first result of a PU and its total is
  // latched with the last one, so skip_cnt stays valid while the next PU runs.
  logic [15:0] skip_acc;
  logic        res_first, res_last;
  assign res_first = res_valid && res_phase == PH_ABC && res_idx == 5'd0;
  assign res_last  = res_valid && res_phase == PH_QTR && res_idx == 5'(3 * N_UNITS - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      skip_acc <= '0;
      skip_cnt <= '0;
    end else if (res_valid) begin
      skip_acc <= (res_first ? 16'd0 : skip_acc) + 16'(skp_now);
      if (res_last) skip_cnt <= skip_acc + 16'(skp_now);
    end
  end

endmodule
