// Testbench of hevc_fir: all three filter types against the coefficient-table
// reference, on extreme windows (all 0, all 255, alternating, clip cases),
// windows of equal pixels (result must equal that pixel) and random windows.
module tb_hevc_fir;
  import hevc_interp_pkg::*;
  import interp_ref_pkg::*;

  pixel_t taps [N_TAPS];
  pixel_t res [3];
  int checks = 0, failures = 0;

  hevc_fir #(.FTYPE(FILT_A)) u_a (.taps, .result(res[0]));
  hevc_fir #(.FTYPE(FILT_B)) u_b (.taps, .result(res[1]));
  hevc_fir #(.FTYPE(FILT_C)) u_c (.taps, .result(res[2]));

  task automatic check_win(win_t w);
    for (int i = 0; i < 8; i++) taps[i] = pixel_t'(w[i]);
    #1;
    for (int f = 0; f < 3; f++) begin
      checks++;
      if (int'(res[f]) != int'(fir(f, w))) begin
        failures++;
        $display("FAIL type %0d win %p: got %0d exp %0d", f, w, res[f], fir(f, w));
      end
    end
  endtask

  initial begin
    win_t w;
    for (int v = 0; v < 256; v++) begin
      for (int i = 0; i < 8; i++) w[i] = v;
      check_win(w);
      for (int f = 0; f < 3; f++) begin
        checks++;
        if (int'(res[f]) != v) begin failures++; $display("FAIL flat %0d type %0d", v, f); end
      end
    end
    for (int i = 0; i < 8; i++) w[i] = (i % 2) ? 255 : 0;
    check_win(w);
    for (int i = 0; i < 8; i++) w[i] = (i % 2) ? 0 : 255;
    check_win(w);
    w = '{255, 0, 255, 0, 0, 255, 0, 255};  check_win(w);
    w = '{0, 255, 0, 255, 255, 0, 255, 0};  check_win(w);
    w = '{0, 0, 255, 255, 0, 0, 0, 0};      check_win(w);
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < 8; i++) w[i] = $urandom_range(255);
      check_win(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
