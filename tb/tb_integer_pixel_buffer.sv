// Testbench of integer_pixel_buffer: loads random 15x15 windows, reads back
// every row and every column, and checks that the contents stay when load is
// low.
module tb_integer_pixel_buffer;
  import hevc_interp_pkg::*;

  logic       clk = 0, load = 0, rd_col_mode = 0;
  logic [3:0] rd_idx = 0;
  pixel_t     pix_in [N_BUS][N_BUS];
  pixel_t     rd_data [N_BUS];
  pixel_t     model [N_BUS][N_BUS];
  int checks = 0, failures = 0;

  integer_pixel_buffer dut (.clk, .load, .pix_in, .rd_col_mode, .rd_idx, .rd_data);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      for (int r = 0; r < N_BUS; r++)
        for (int c = 0; c < N_BUS; c++) pix_in[r][c] = pixel_t'($urandom_range(255));
      load = (n == 0) || ($urandom_range(1) == 1);
      if (load) model = pix_in;
      @(negedge clk);
      load = 0;
      for (int r = 0; r < N_BUS; r++)
        for (int c = 0; c < N_BUS; c++) pix_in[r][c] = pixel_t'($urandom_range(255));
      for (int m = 0; m < 2; m++)
        for (int i = 0; i < N_BUS; i++) begin
          rd_col_mode = m[0];
          rd_idx = 4'(i);
          #1;
          for (int j = 0; j < N_BUS; j++) begin
            checks++;
            if (rd_data[j] != (m ? model[j][i] : model[i][j])) begin
              failures++;
              $display("FAIL mode %0d idx %0d elem %0d", m, i, j);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
