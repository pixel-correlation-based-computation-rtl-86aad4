// Testbench of interp_unit: random windows and disable patterns. One cycle
// after each issue the three outputs must equal the reference filter result
// (enabled) or the largest-coefficient pixel (disabled); a disabled filter's
// input register must keep its previous contents, and nothing may change
// while en is low.
module tb_interp_unit;
  import hevc_interp_pkg::*;
  import interp_ref_pkg::*;

  logic   clk = 0, rst_n = 0, en = 0;
  pixel_t win [N_TAPS];
  logic   dis [3];
  pixel_t out_pix [3];
  logic   out_skip [3];
  int checks = 0, failures = 0;

  interp_unit dut (.clk, .rst_n, .en, .win, .dis, .out_pix, .out_skip);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    win_t w;
    pixel_t exp_pix [3];
    logic   exp_skip [3];
    pixel_t held_a [N_TAPS];
    for (int i = 0; i < N_TAPS; i++) win[i] = '0;
    for (int f = 0; f < 3; f++) dis[f] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 8; i++) w[i] = $urandom_range(255);
      held_a = dut.g_filt[0].taps_q;
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      for (int i = 0; i < 8; i++) win[i] = pixel_t'(w[i]);
      for (int f = 0; f < 3; f++) begin
        dis[f] = ($urandom_range(2) == 0);
        exp_skip[f] = en ? dis[f] : out_skip[f];
        exp_pix[f]  = !en ? out_pix[f] : dis[f] ? pixel_t'(w[BYP[f]]) : pixel_t'(fir(f, w));
      end
      @(negedge clk);
      for (int f = 0; f < 3; f++) begin
        chk(out_pix[f] == exp_pix[f], $sformatf("out_pix[%0d] got %0d exp %0d", f, out_pix[f], exp_pix[f]));
        chk(out_skip[f] == exp_skip[f], $sformatf("out_skip[%0d]", f));
      end
      if (!en || dis[0]) chk(dut.g_filt[0].taps_q == held_a, "type A input register held");
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
