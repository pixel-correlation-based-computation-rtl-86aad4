// Interpolation unit: three HEVC filters (types A, B, C) for one output
// position, with per-filter input registers and an output bypass multiplexer.
//
// In the issue cycle (en = 1) the unit receives a window of 8 consecutive
// pixels win[0..7] = A(-3)..A(4) and one disable bit per filter from the
// comparison unit. A filter that is not disabled loads the window into its
// own input register. A disabled filter keeps its input register unchanged,
// so its adder tree does not toggle; instead the unit stores the window pixel
// that the filter's largest coefficient multiplies (type A: A(0), type B:
// A(0), type C: A(1)) and the output multiplexer selects it in place of the
// filter result. Keeping the registers still and selecting that pixel is the
// filter-skipping scheme of the design; the choice of A(0) for type B, whose
// two largest coefficients are equal, is this design's.
//
// Timing: results out_pix[f] and the flags out_skip[f] are valid in the cycle
// after the issue cycle and stay until the next issue.
module interp_unit
  import hevc_interp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  pixel_t win [N_TAPS],
  input  logic   dis [3],
  output pixel_t out_pix [3],
  output logic   out_skip [3]
);

  // Window position whose coefficient is the largest, per filter type.
  localparam int unsigned BYP_IDX [3] = '{3, 3, 4};

  for (genvar f = 0; f < 3; f++) begin : g_filt
    pixel_t taps_q [N_TAPS];
    pixel_t byp_q;
    logic   skip_q;
    pixel_t fir_out;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < N_TAPS; i++) taps_q[i] <= '0;
        byp_q  <= '0;
        skip_q <= 1'b0;
      end else if (en) begin
        skip_q <= dis[f];
        if (dis[f]) byp_q <= win[BYP_IDX[f]];
        else        taps_q <= win;
      end
    end

    hevc_fir #(.FTYPE(filt_e'(f))) u_fir (
      .taps   (taps_q),
      .result (fir_out)
    );

    assign out_pix[f]  = skip_q ? byp_q : fir_out;
    assign out_skip[f] = skip_q;
  end

endmodule
