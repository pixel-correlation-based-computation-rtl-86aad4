// Testbench of comparison_unit: buses with runs of equal and of nearly equal
// pixels, in every mode and truncation, against the reference similarity
// test applied to each unit's window.
module tb_comparison_unit;
  import hevc_interp_pkg::*;
  import interp_ref_pkg::*;

  pixel_t    row [N_BUS];
  red_mode_e mode;
  logic [2:0] trunc_bits;
  logic      dis [N_UNITS][3];
  int checks = 0, failures = 0;
  int n_dis = 0;

  comparison_unit dut (.row, .mode, .trunc_bits, .dis);

  initial begin
    win_t w;
    int red, tr, base, sp;
    for (int n = 0; n < 20000; n++) begin
      red  = $urandom_range(2);
      tr   = $urandom_range(7);
      base = $urandom_range(255);
      sp   = $urandom_range(4);          // spread: 0 = runs of equal pixels
      for (int i = 0; i < N_BUS; i++) begin
        int v;
        if ($urandom_range(9) == 0) base = $urandom_range(255);
        v = base + ((sp == 0) ? 0 : int'($urandom_range(1 << (sp - 1))));
        row[i] = pixel_t'((v > 255) ? 255 : v);
      end
      mode = red_mode_e'(red);
      trunc_bits = 3'(tr);
      #1;
      for (int k = 0; k < N_UNITS; k++) begin
        for (int i = 0; i < 8; i++) w[i] = row[k+i];
        for (int f = 0; f < 3; f++) begin
          checks++;
          if (dis[k][f]) n_dis++;
          if (dis[k][f] != similar(f, w, red, tr)) begin
            failures++;
            $display("FAIL unit %0d type %0d mode %0d trunc %0d", k, f, red, tr);
          end
        end
      end
    end
    checks++;
    if (n_dis == 0) begin failures++; $display("FAIL no filter was ever disabled"); end
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
