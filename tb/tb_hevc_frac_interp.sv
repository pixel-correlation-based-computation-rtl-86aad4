// End-to-end testbench of hevc_frac_interp at its default size.
//
// Feeds 8x8 PUs with different textures (random, flat, flat with small
// noise, gradients, bright/dark edges) in all three reduction modes and all
// PSCR truncations, some after idle cycles and some back to back. When done
// pulses the whole content of the three output buffers (15 planes) is read
// within that cycle and compared with the reference model, together with the
// skipped-evaluation count. Also checks: done 49 cycles after the load cycle,
// a back-to-back period of 48 cycles, that PECR output equals the exact
// (no-reduction) output, and that each mechanism happened at least once:
// PECR skips, PSCR skips of non-identical pixels, no skips with reduction
// off, back-to-back starts and clipping of the filter output.
`timescale 1ns/1ps
module tb_hevc_frac_interp;
  import hevc_interp_pkg::*;
  import interp_ref_pkg::*;

  localparam int N_PU = 40;

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

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  typedef struct {
    pu_in_t p;
    int     red;
    int     tr;
    int     t_load;
  } job_t;
  job_t jobs [$];

  // mechanism counters
  int n_pecr_skip = 0, n_pscr_extra = 0, n_off_pu = 0, n_b2b = 0, n_clip = 0, n_done = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic void make_pu(int kind, output pu_in_t p);
    int base = $urandom_range(255);
    for (int r = 0; r < 15; r++)
      for (int c = 0; c < 15; c++) begin
        int v;
        unique case (kind)
          0: v = $urandom_range(255);                              // random
          1: v = base;                                             // flat
          2: v = (base & 8'hF0) + int'($urandom_range(3));         // flat with 2-bit noise
          3: v = (base + 3 * r + c) % 256;                         // gradient
          4: v = ((r + c) % 5 < 2) ? 255 : 0;                      // hard edges, clipping
          default: v = (c < 7) ? base : (base ^ 8'h80);            // half flat, step
        endcase
        p[r][c] = pix_t'(v);
      end
  endfunction

  // ---------------- driver
  initial begin
    job_t j;
    int prev_load = -1000;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < N_PU; n++) begin
      make_pu(n % 6, j.p);
      j.red = (n / 6) % 3;
      j.tr  = 1 + (n % 4);
      // optional idle gap; otherwise start as soon as ready
      if (n % 3 == 2) repeat (2 + $urandom_range(3)) @(negedge clk);
      while (!ready) @(negedge clk);
      for (int r = 0; r < 15; r++)
        for (int c = 0; c < 15; c++) pix_in[r][c] = pixel_t'(j.p[r][c]);
      mode = red_mode_e'(j.red);
      trunc_bits = 3'(j.tr);
      start = 1;
      j.t_load = cyc;
      if (j.t_load - prev_load == 48) n_b2b++;
      chk(j.t_load - prev_load >= 48, "PU period at least 48 cycles");
      prev_load = j.t_load;
      jobs.push_back(j);
      @(negedge clk);
      start = 0;
      for (int r = 0; r < 15; r++)
        for (int c = 0; c < 15; c++) pix_in[r][c] = pixel_t'($urandom_range(255));
      mode = red_mode_e'($urandom_range(2));
      trunc_bits = 3'($urandom_range(7));
    end
  end

  // ---------------- monitor
  initial begin
    job_t j;
    pu_out_t exp_o, exact_o;
    int exp_skips, exact_skips;
    forever begin
      @(negedge clk);
      if (!done) continue;
      j = jobs.pop_front();
      chk(cyc - j.t_load == 49, $sformatf("done %0d cycles after load", cyc - j.t_load));
      pu(j.p, j.red, j.tr, exp_o, exp_skips);
      pu(j.p, 0, 0, exact_o, exact_skips);
      chk(int'(skip_cnt) == exp_skips, $sformatf("skip_cnt %0d exp %0d", skip_cnt, exp_skips));
      if (j.red == 1 && exp_skips > 0) n_pecr_skip++;
      if (j.red == 0) begin
        n_off_pu++;
        chk(skip_cnt == 0, "no skips with reduction off");
      end
      if (j.red == 2) begin
        pu_out_t pe; int pe_skips;
        pu(j.p, 1, 0, pe, pe_skips);
        if (exp_skips > pe_skips) n_pscr_extra++;
      end
      for (int pl = 0; pl < 5; pl++)
        for (int y = 0; y < 8; y++) begin
          rd_plane = 3'(pl);
          rd_row   = 3'(y);
          #1;
          for (int x = 0; x < 8; x++) begin
            chk(int'(rd_a[x]) == exp_o[0][pl][y][x], $sformatf("buf A plane %0d (%0d,%0d) got %0d exp %0d", pl, y, x, rd_a[x], exp_o[0][pl][y][x]));
            chk(int'(rd_b[x]) == exp_o[1][pl][y][x], $sformatf("buf B plane %0d (%0d,%0d) got %0d exp %0d", pl, y, x, rd_b[x], exp_o[1][pl][y][x]));
            chk(int'(rd_c[x]) == exp_o[2][pl][y][x], $sformatf("buf C plane %0d (%0d,%0d) got %0d exp %0d", pl, y, x, rd_c[x], exp_o[2][pl][y][x]));
            if (j.red == 1) begin
              chk(rd_a[x] == exact_o[0][pl][y][x] && rd_b[x] == exact_o[1][pl][y][x] &&
                  rd_c[x] == exact_o[2][pl][y][x], "PECR output equals exact output");
            end
            if (j.red == 0 && (rd_a[x] == 0 || rd_a[x] == 255) && (j.p[3][3] != rd_a[x])) n_clip++;
          end
        end
      n_done++;
      if (n_done == N_PU) begin
        chk(n_pecr_skip > 0, "PECR skip happened");
        chk(n_pscr_extra > 0, "PSCR skipped non-identical pixels");
        chk(n_off_pu > 0, "reduction-off PU ran");
        chk(n_b2b > 0, "back-to-back start happened");
        chk(n_clip > 0, "clipped filter output happened");
        chk(jobs.size() == 0, "all PUs completed");
        $display("mechanisms: pecr_skip_pus=%0d pscr_extra_pus=%0d off_pus=%0d back_to_back=%0d clip=%0d",
                 n_pecr_skip, n_pscr_extra, n_off_pu, n_b2b, n_clip);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (N_PU * 60 + 200) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d PUs done", n_done, N_PU);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
