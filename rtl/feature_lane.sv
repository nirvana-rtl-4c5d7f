// feature_lane: window statistics for one instruction type.
//
// Each clock window it tracks, for the frames its filter selected: the
// smallest and largest PC, the sum and number of PCs, and the sum and number
// of intervals between neighbouring selected frames (the first frame of a
// window has no neighbour inside it and adds no interval). When the window
// ends, these statistics are moved to a "closed" set and the window starts
// empty. One cycle later the feature extractor decides, from the closed PC
// extremes of both lanes, whether the window is kept: a kept window is added
// to the function accumulators; a discarded one is dropped.
// The accumulators hold everything kept since the last function switch and
// are the raw material of the averages the extractor divides out.
//
// Timing: win_end marks the last cycle of a window; a frame in that cycle
// still belongs to the window. decide comes exactly one cycle after win_end,
// with keep and acc_clear valid; acc_clear empties the accumulators (after
// the extractor has copied them) and wins over keep.
// The accumulators saturate: a kept window that would overflow the counts is
// ignored, so sums and counts always stay consistent.
//
// The per-window PC range and the averages over retained windows follow the
// published method. Keeping intervals inside a window only, and the widths
// (N_W-bit counts, 32+N_W-bit sums), are this design's own choices.
module feature_lane
  import nirvana_pkg::*;
#(
  parameter int unsigned N_W = 24        // frame / interval counter width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel_valid,
  input  logic [XLEN-1:0]   sel_pc,
  input  logic [CNT_W-1:0]  sel_cnt,
  input  logic              win_end,
  input  logic              decide,
  input  logic              keep,
  input  logic              acc_clear,
  output logic              closed_any,     // the closed window holds a frame
  output logic [XLEN-1:0]   closed_min,     // its smallest PC
  output logic [XLEN-1:0]   closed_max,     // its largest PC
  output logic [XLEN+N_W-1:0] acc_sum_pc,
  output logic [N_W-1:0]      acc_n_pc,
  output logic [XLEN+N_W-1:0] acc_sum_int,
  output logic [N_W-1:0]      acc_n_int
);

  localparam int unsigned SUM_W = XLEN + N_W;

  typedef struct packed {
    logic [XLEN-1:0]  pc_min;
    logic [XLEN-1:0]  pc_max;
    logic [SUM_W-1:0] sum_pc;
    logic [N_W-1:0]   n_pc;
    logic [SUM_W-1:0] sum_int;
    logic [N_W-1:0]   n_int;
  } win_stats_t;

  win_stats_t       win_q, win_nxt, closed_q;
  logic [CNT_W-1:0] last_cnt_q;
  logic [CNT_W-1:0] gap;

  // Window statistics including this cycle's frame.
  always_comb begin
    win_nxt = win_q;
    gap     = sel_cnt - last_cnt_q;
    if (sel_valid) begin
      if (win_q.n_pc == '0) begin
        win_nxt.pc_min = sel_pc;
        win_nxt.pc_max = sel_pc;
      end else begin
        if (sel_pc < win_q.pc_min) win_nxt.pc_min = sel_pc;
        if (sel_pc > win_q.pc_max) win_nxt.pc_max = sel_pc;
        win_nxt.sum_int = win_q.sum_int + SUM_W'(gap);
        win_nxt.n_int   = win_q.n_int + 1'b1;
      end
      win_nxt.sum_pc = win_q.sum_pc + SUM_W'(sel_pc);
      win_nxt.n_pc   = win_q.n_pc + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_q      <= '0;
      closed_q   <= '0;
      last_cnt_q <= '0;
    end else begin
      if (sel_valid) last_cnt_q <= sel_cnt;
      if (win_end) begin
        closed_q <= win_nxt;
        win_q    <= '0;
      end else begin
        win_q    <= win_nxt;
      end
    end
  end

  assign closed_any = (closed_q.n_pc != '0);
  assign closed_min = closed_q.pc_min;
  assign closed_max = closed_q.pc_max;

  // Function accumulators over retained windows.
  logic [N_W:0] n_pc_sum, n_int_sum;
  assign n_pc_sum  = {1'b0, acc_n_pc}  + {1'b0, closed_q.n_pc};
  assign n_int_sum = {1'b0, acc_n_int} + {1'b0, closed_q.n_int};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_sum_pc  <= '0;
      acc_n_pc    <= '0;
      acc_sum_int <= '0;
      acc_n_int   <= '0;
    end else if (decide) begin
      if (acc_clear) begin
        acc_sum_pc  <= '0;
        acc_n_pc    <= '0;
        acc_sum_int <= '0;
        acc_n_int   <= '0;
      end else if (keep && !n_pc_sum[N_W] && !n_int_sum[N_W]) begin
        acc_sum_pc  <= acc_sum_pc  + closed_q.sum_pc;
        acc_n_pc    <= n_pc_sum[N_W-1:0];
        acc_sum_int <= acc_sum_int + closed_q.sum_int;
        acc_n_int   <= n_int_sum[N_W-1:0];
      end
    end
  end

endmodule
