// Controller: schedules one 8x8 PU in 48 cycles.
//
//   cycle 0        load   : start accepted, integer pixel window loaded
//   cycles 1..15   PH_ABC : rows 0..14 of the window -> a, b, c (15 x 8 each)
//   cycles 16..23  PH_DHN : columns 3..10 of the window -> d, h, n (8 x 8 each)
//   cycles 24..47  PH_QTR : columns 0..7 of transpose memory A, then B, then C
//                           -> e,i,p / f,j,q / g,k,r (9 x 8 x 8 in all)
// The cycle counts per phase are the design's; issuing the horizontal phase
// before the vertical d/h/n phase is this implementation's choice, so the
// transpose memories are complete, despite the one-cycle filter latency, when
// the quarter pixel phase starts. The results of cycle 47 are written in the
// next cycle, which is also the load cycle of the next PU, so back-to-back
// PUs take 48 cycles each.
//
// Interface: start is accepted when ready is high (load = start & ready).
// done pulses for one cycle once all results of the PU are in the output
// buffers. res_* is the issue tag delayed to line up with the results.
module interp_controller
  import hevc_interp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       ready,
  output logic       load,
  output logic       done,
  // issue side
  output logic       issue,
  output phase_e     phase,
  output logic [4:0] idx,
  output src_e       src_sel,
  output logic       int_col_mode,
  output logic [3:0] int_idx,
  output logic [2:0] tm_col,
  // result side
  output logic       res_valid,
  output phase_e     res_phase,
  output logic [4:0] res_idx
);

  localparam int unsigned N_ABC = N_BUS;        // 15
  localparam int unsigned N_DHN = N_UNITS;      // 8
  localparam int unsigned N_QTR = 3 * N_UNITS;  // 24
  localparam int unsigned N_ISSUE = N_ABC + N_DHN + N_QTR;  // 47

  logic       busy;
  logic [5:0] cnt;

  assign ready = !busy;
  assign load  = start && ready;
  assign issue = busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (busy) begin
      if (cnt == 6'(N_ISSUE - 1)) busy <= 1'b0;
      cnt <= cnt + 6'd1;
    end
  end

  always_comb begin
    phase        = PH_ABC;
    idx          = 5'(cnt);
    src_sel      = SRC_INT;
    int_col_mode = 1'b0;
    int_idx      = cnt[3:0];
    tm_col       = '0;
    if (cnt >= 6'(N_ABC + N_DHN)) begin
      phase   = PH_QTR;
      idx     = 5'(cnt - 6'(N_ABC + N_DHN));
      src_sel = src_e'(2'd1 + 2'(idx[4:3]));
      tm_col  = idx[2:0];
    end else if (cnt >= 6'(N_ABC)) begin
      phase        = PH_DHN;
      idx          = 5'(cnt - 6'(N_ABC));
      int_col_mode = 1'b1;
      int_idx      = 4'(idx) + 4'd3;   // PU columns 0..7 are window columns 3..10
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_phase <= PH_ABC;
      res_idx   <= '0;
      done      <= 1'b0;
    end else begin
      res_valid <= issue;
      res_phase <= phase;
      res_idx   <= idx;
      done      <= res_valid && res_phase == PH_QTR && res_idx == 5'(N_QTR - 1);
    end
  end

  // Handshake and schedule rules.
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> cnt < 6'(N_ISSUE));
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> !busy);
  a_done_after_last: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !$past(issue) || $past(load));

endmodule
