// Testbench of result_demux: every tag of a PU schedule, plus invalid cycles,
// against the routing table written out here.
module tb_result_demux;
  import hevc_interp_pkg::*;

  logic       valid;
  phase_e     phase;
  logic [4:0] idx;
  logic       tm_we, ob_we, ob_col_mode;
  logic [3:0] tm_row;
  logic [2:0] ob_plane, ob_idx;
  int checks = 0, failures = 0;

  result_demux dut (.valid, .phase, .idx, .tm_we, .tm_row, .ob_we, .ob_plane, .ob_col_mode, .ob_idx);

  task automatic expect_out(bit e_tm, int e_row, bit e_ob, int e_pl, bit e_col, int e_idx);
    #1;
    checks++;
    if (tm_we != e_tm || (e_tm && int'(tm_row) != e_row) || ob_we != e_ob ||
        (e_ob && (int'(ob_plane) != e_pl || ob_col_mode != e_col || int'(ob_idx) != e_idx))) begin
      failures++;
      $display("FAIL valid %0d phase %0d idx %0d: tm %0d/%0d ob %0d/%0d/%0d/%0d", valid, phase, idx,
               tm_we, tm_row, ob_we, ob_plane, ob_col_mode, ob_idx);
    end
  endtask

  initial begin
    for (int v = 0; v < 2; v++) begin
      valid = v[0];
      for (int r = 0; r < 15; r++) begin
        phase = PH_ABC; idx = 5'(r);
        expect_out(v == 1, r, v == 1 && r >= 3 && r <= 10, 0, 1'b0, r - 3);
      end
      for (int c = 0; c < 8; c++) begin
        phase = PH_DHN; idx = 5'(c);
        expect_out(1'b0, 0, v == 1, 1, 1'b1, c);
      end
      for (int q = 0; q < 24; q++) begin
        phase = PH_QTR; idx = 5'(q);
        expect_out(1'b0, 0, v == 1, 2 + q / 8, 1'b1, q % 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
