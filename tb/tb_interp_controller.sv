// Testbench of interp_controller: checks the 48-cycle schedule cycle by
// cycle (phase, index, source select, buffer addresses, delayed result tag),
// the start/ready handshake, the done pulse 48 cycles after the load cycle
// and a back-to-back period of 48 cycles.
module tb_interp_controller;
  import hevc_interp_pkg::*;

  logic       clk = 0, rst_n = 0, start = 0;
  logic       ready, load, done, issue, int_col_mode, res_valid;
  phase_e     phase, res_phase;
  logic [4:0] idx, res_idx;
  src_e       src_sel;
  logic [3:0] int_idx;
  logic [2:0] tm_col;
  int checks = 0, failures = 0;
  int cyc = 0;

  interp_controller dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // expected issue in the n-th cycle after the load cycle (n = 1..47)
  task automatic check_issue(int n);
    int c = n - 1;
    chk(issue && !ready, "issuing and busy");
    if (c < 15) begin
      chk(phase == PH_ABC && int'(idx) == c && src_sel == SRC_INT && !int_col_mode && int'(int_idx) == c,
          $sformatf("abc issue %0d", c));
    end else if (c < 23) begin
      chk(phase == PH_DHN && int'(idx) == c - 15 && src_sel == SRC_INT && int_col_mode &&
          int'(int_idx) == c - 15 + 3, $sformatf("dhn issue %0d", c));
    end else begin
      chk(phase == PH_QTR && int'(idx) == c - 23 && int'(src_sel) == 1 + (c - 23) / 8 &&
          int'(tm_col) == (c - 23) % 8, $sformatf("qtr issue %0d", c));
    end
  endtask

  initial begin
    int t_load, prev_load;
    phase_e ph_d; logic [4:0] idx_d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    chk(ready && !issue && !done, "idle after reset");
    // idle cycles without start stay idle
    repeat (3) @(negedge clk);
    chk(ready && !issue, "idle without start");
    prev_load = -1;
    for (int pu = 0; pu < 4; pu++) begin
      // PUs 0 and 2 start after idle cycles, 1 and 3 in the drain cycle of the one before
      chk(ready, "ready before start");
      start = 1;
      #1;
      chk(load, "load when start and ready");
      t_load = cyc;
      if (pu % 2 == 1) chk(t_load - prev_load == 48, $sformatf("back-to-back period %0d", t_load - prev_load));
      prev_load = t_load;
      @(negedge clk);
      start = 0;
      for (int n = 1; n <= 47; n++) begin
        chk(!load, "no load while busy");
        check_issue(n);
        if (n == 1) chk(done == (pu % 2 == 1), "done of the previous PU in the first issue cycle");
        else        chk(!done, "no done while issuing");
        ph_d = phase; idx_d = idx;
        start = ($urandom_range(3) == 0);   // ignored while busy
        @(negedge clk);
        start = 0;
        chk(res_valid && res_phase == ph_d && res_idx == idx_d, "result tag delayed by one cycle");
      end
      // cycle 48 after the load: last results written, ready again
      chk(ready && !issue && !done, "ready in drain cycle");
      if (pu % 2 == 1) begin
        @(negedge clk);
        chk(done, "done pulse");
        chk(cyc - t_load == 49, $sformatf("done %0d cycles after load", cyc - t_load));
        @(negedge clk);
        chk(!done && !res_valid, "done is one cycle, pipeline empty");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
