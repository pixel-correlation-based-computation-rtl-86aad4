// Testbench of source_mux: random inputs, every select value.
module tb_source_mux;
  import hevc_interp_pkg::*;

  src_e   sel;
  pixel_t in [4][N_BUS];
  pixel_t row [N_BUS];
  int checks = 0, failures = 0;

  source_mux dut (.sel, .int_data(in[0]), .tm_a(in[1]), .tm_b(in[2]), .tm_c(in[3]), .row);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int s = 0; s < 4; s++)
        for (int i = 0; i < N_BUS; i++) in[s][i] = pixel_t'($urandom_range(255));
      for (int s = 0; s < 4; s++) begin
        sel = src_e'(s);
        #1;
        for (int i = 0; i < N_BUS; i++) begin
          checks++;
          if (row[i] != in[s][i]) begin failures++; $display("FAIL sel %0d elem %0d", s, i); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
