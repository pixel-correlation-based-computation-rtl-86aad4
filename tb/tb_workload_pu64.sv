// Workload testbench: one 64x64 prediction unit, the largest HEVC PU size,
// processed as 64 back-to-back 8x8 blocks of the default-size design.
//
// The picture region (71x71 integer pixels including the filter margins) is
// generated here: a smooth two-direction gradient with a flat patch and
// low-amplitude noise, a stand-in for natural video. The whole PU is run
// once per variant: no reduction, PECR, and PSCR with 1, 2, 3 and 4
// truncated bits. For every block all 960 outputs and the skip count are
// compared with the reference model; the run must take 64 x 48 cycles from
// the first start to the last start plus 48, and the skipped share of the
// 64 x 1128 filter evaluations is printed per variant (it must be zero with
// reduction off and must not fall as truncation grows).
`timescale 1ns/1ps
module tb_workload_pu64;
  import hevc_interp_pkg::*;
  import interp_ref_pkg::*;

  localparam int PU = 64;
  localparam int NB = PU / 8;
  localparam int W  = PU + 7;

  logic       clk = 0, rst_n = 0, start = 0;
  logic       ready, done;
  pixel_t     pix_in [N_BUS][N_BUS];
  red_mode_e  mode = RED_OFF;
  logic [2:0] trunc_bits = 0;
  logic [2:0] rd_plane = 0, rd_row = 0;
  pixel_t     rd_a [N_UNITS], rd_b [N_UNITS], rd_c [N_UNITS];
  logic [15:0] skip_cnt;

  hevc_frac_interp dut (.*);

  always #500 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  pix_t img [W][W];
  int   t_first, t_last, blocks_done, skip_total;
  int   block_q [$];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic void block_in(int b, output pu_in_t p);
    int by = (b / NB) * 8, bx = (b % NB) * 8;
    for (int r = 0; r < 15; r++)
      for (int c = 0; c < 15; c++) p[r][c] = img[by + r][bx + c];
  endfunction

  int red, tr;

  // monitor: check every finished block
  initial begin
    pu_in_t p;
    pu_out_t o;
    int s;
    forever begin
      @(negedge clk);
      if (!done) continue;
      block_in(block_q.pop_front(), p);
      pu(p, red, tr, o, s);
      chk(int'(skip_cnt) == s, $sformatf("skip_cnt %0d exp %0d", skip_cnt, s));
      skip_total += int'(skip_cnt);
      for (int pl = 0; pl < 5; pl++)
        for (int y = 0; y < 8; y++) begin
          rd_plane = 3'(pl); rd_row = 3'(y);
          #1;
          for (int x = 0; x < 8; x++)
            chk(int'(rd_a[x]) == o[0][pl][y][x] && int'(rd_b[x]) == o[1][pl][y][x] &&
                int'(rd_c[x]) == o[2][pl][y][x], $sformatf("plane %0d (%0d,%0d)", pl, y, x));
        end
      blocks_done++;
    end
  end

  initial begin
    real pct, prev_pct;
    pu_in_t p;
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = 60 + (2 * y + x) / 3 + int'($urandom_range(3));
        if (x >= 20 && x < 45 && y >= 10 && y < 40) v = 140;          // flat patch
        img[y][x] = pix_t'(v > 255 ? 255 : v);
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(negedge clk);
    prev_pct = 0.0;
    for (int variant = 0; variant < 6; variant++) begin
      red = (variant == 0) ? 0 : (variant == 1) ? 1 : 2;
      tr  = (variant >= 2) ? variant - 1 : 0;
      blocks_done = 0;
      skip_total = 0;
      while (!ready) @(negedge clk);
      for (int b = 0; b < NB * NB; b++) begin
        block_in(b, p);
        for (int r = 0; r < 15; r++)
          for (int c = 0; c < 15; c++) pix_in[r][c] = pixel_t'(p[r][c]);
        mode = red_mode_e'(red);
        trunc_bits = 3'(tr);
        while (!ready) @(negedge clk);
        start = 1;
        block_q.push_back(b);
        if (b == 0) t_first = cyc;
        t_last = cyc;
        @(negedge clk);
        start = 0;
      end
      while (blocks_done < NB * NB) @(negedge clk);
      chk(t_last - t_first == (NB * NB - 1) * 48, $sformatf("64x64 PU issue span %0d cycles", t_last - t_first));
      pct = 100.0 * skip_total / (NB * NB * 47 * 24);
      $display("variant mode=%0d trunc=%0d: %0d cycles for the PU, skipped %0d of %0d filter evaluations (%0.2f%%)",
               red, tr, t_last - t_first + 48, skip_total, NB * NB * 47 * 24, pct);
      if (variant == 0) chk(skip_total == 0, "no skips with reduction off");
      else begin
        chk(skip_total > 0, "some skips with reduction on");
        chk(pct >= prev_pct, "skip share does not fall with more truncation");
      end
      prev_pct = pct;
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * 64 * 60 + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
