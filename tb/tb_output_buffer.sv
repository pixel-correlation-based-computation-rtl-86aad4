// Testbench of output_buffer: random row and column writes to all planes,
// mixed with idle cycles, then every row of every plane read back against a
// model.
module tb_output_buffer;
  import hevc_interp_pkg::*;

  logic       clk = 0, we = 0, col_mode = 0;
  logic [2:0] plane = 0, idx = 0, rd_plane = 0, rd_row = 0;
  pixel_t     wr_data [N_UNITS];
  pixel_t     rd_data [N_UNITS];
  pixel_t     model [N_PLANES][N_UNITS][N_UNITS];
  int checks = 0, failures = 0;

  output_buffer dut (.clk, .we, .plane, .col_mode, .idx, .wr_data, .rd_plane, .rd_row, .rd_data);

  always #5 clk = ~clk;

  initial begin
    // fill every plane row by row first
    for (int p = 0; p < N_PLANES; p++)
      for (int r = 0; r < N_UNITS; r++) begin
        @(negedge clk);
        we = 1; plane = 3'(p); col_mode = 0; idx = 3'(r);
        for (int i = 0; i < N_UNITS; i++) begin
          wr_data[i] = pixel_t'($urandom_range(255));
          model[p][r][i] = wr_data[i];
        end
      end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = ($urandom_range(3) != 0);
      plane = 3'($urandom_range(N_PLANES - 1));
      col_mode = 1'($urandom_range(1));
      idx = 3'($urandom_range(7));
      for (int i = 0; i < N_UNITS; i++) begin
        wr_data[i] = pixel_t'($urandom_range(255));
        if (we) begin
          if (col_mode) model[plane][i][idx] = wr_data[i];
          else          model[plane][idx][i] = wr_data[i];
        end
      end
      if (n % 50 == 49) begin
        @(negedge clk);
        we = 0;
        for (int p = 0; p < N_PLANES; p++)
          for (int r = 0; r < N_UNITS; r++) begin
            rd_plane = 3'(p); rd_row = 3'(r);
            #1;
            for (int i = 0; i < N_UNITS; i++) begin
              checks++;
              if (rd_data[i] != model[p][r][i]) begin
                failures++;
                $display("FAIL plane %0d row %0d col %0d", p, r, i);
              end
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
