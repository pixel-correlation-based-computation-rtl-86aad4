// Testbench of transpose_memory: writes rows in random order, with some
// cycles not writing, and reads back every column.
module tb_transpose_memory;
  import hevc_interp_pkg::*;

  logic       clk = 0, wr_en = 0;
  logic [3:0] wr_row = 0;
  logic [2:0] rd_col = 0;
  pixel_t     wr_data [N_UNITS];
  pixel_t     rd_data [N_BUS];
  pixel_t     model [N_BUS][N_UNITS];
  int checks = 0, failures = 0;

  transpose_memory dut (.clk, .wr_en, .wr_row, .wr_data, .rd_col, .rd_data);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 30; n++) begin
      for (int r = 0; r < N_BUS; r++) begin
        @(negedge clk);
        wr_en  = (n == 0) || ($urandom_range(2) != 0);
        wr_row = 4'(r);
        for (int c = 0; c < N_UNITS; c++) wr_data[c] = pixel_t'($urandom_range(255));
        if (wr_en) model[r] = wr_data;
      end
      @(negedge clk);
      wr_en = 0;
      for (int c = 0; c < N_UNITS; c++) begin
        rd_col = 3'(c);
        #1;
        for (int r = 0; r < N_BUS; r++) begin
          checks++;
          if (rd_data[r] != model[r][c]) begin
            failures++;
            $display("FAIL row %0d col %0d: %0d vs %0d", r, c, rd_data[r], model[r][c]);
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
