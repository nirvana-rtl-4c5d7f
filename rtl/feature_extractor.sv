// feature_extractor: turns the dense debug-frame stream into sparse
// per-function feature samples.
//
// How it works. Time, taken from the collector's clock count, is cut into
// fixed windows of 2**WIN_LOG2 cycles. Two instruction filters pick the
// memory load/store frames and the unconditional-jump frames, and a
// feature_lane per type gathers, for every window, the smallest and largest
// PC, the PC sum and the intervals between neighbouring selected frames.
// When a window closes, the PC range of all its selected frames, both types
// together (largest minus smallest PC), is compared with RANGE_THRESH.
// A range above the threshold means the top-level scheduler made a long jump
// to another algorithm: that window is discarded, and if any windows were
// kept since the previous switch, the function that just ended is summarised
// as one 4-D sample:
//   {avg PC of load/stores, avg load/store interval, avg PC of jumps,
//    avg jump interval}   (sample[0] .. sample[3])
// Windows within the threshold are kept and added to the running sums. The
// averages are computed by four sequential dividers working in parallel.
//
// Interface and timing: frames arrive unstalled (one per cycle at most), with
// now_cnt from the collector in step with them. A window closes in the cycle
// where the low WIN_LOG2 bits of now_cnt are all ones; the keep/discard
// decision is made the next cycle, and the sample appears 57 cycles after
// that (sample_valid for one cycle). Decisions are a window apart, so the
// dividers are always free again in time; windows shorter than the divider
// latency are rejected at elaboration.
// win_kept / win_discarded pulse for each closed window (statistics only).
//
// The window / filter / range-threshold / average flow is the published one.
// The window length and threshold are not given by the source and are this
// design's assumptions, as is emitting a sample at each switch.
module feature_extractor
  import nirvana_pkg::*;
#(
  parameter int unsigned     WIN_LOG2     = 10,          // 1024-cycle windows
  parameter logic [XLEN-1:0] RANGE_THRESH = 32'h0000_1000, // 4 KiB PC range
  parameter int unsigned     N_W          = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CNT_W-1:0]  now_cnt,
  input  logic              mem_valid,
  input  logic [XLEN-1:0]   mem_pc,
  input  logic [CNT_W-1:0]  mem_cnt,
  input  logic              jmp_valid,
  input  logic [XLEN-1:0]   jmp_pc,
  input  logic [CNT_W-1:0]  jmp_cnt,
  output logic              sample_valid,
  output sample_t           sample,
  output logic              win_kept,
  output logic              win_discarded
);

  localparam int unsigned SUM_W = XLEN + N_W;

  logic win_end, decide_q;
  logic discard, keep, emit;
  logic             mem_any, jmp_any;
  logic [XLEN-1:0]  mem_min, mem_max, jmp_min, jmp_max;
  logic [XLEN-1:0]  win_min, win_max, win_range;
  logic [SUM_W-1:0] mem_sum_pc, mem_sum_int, jmp_sum_pc, jmp_sum_int;
  logic [N_W-1:0]   mem_n_pc, mem_n_int, jmp_n_pc, jmp_n_int;

  assign win_end = (now_cnt[WIN_LOG2-1:0] == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) decide_q <= 1'b0;
    else        decide_q <= win_end;
  end

  // PC range of the closed window over the selected frames of both types
  always_comb begin
    if (mem_any && jmp_any) begin
      win_min = (mem_min < jmp_min) ? mem_min : jmp_min;
      win_max = (mem_max > jmp_max) ? mem_max : jmp_max;
    end else if (mem_any) begin
      win_min = mem_min;
      win_max = mem_max;
    end else begin
      win_min = jmp_min;
      win_max = jmp_max;
    end
    win_range = (mem_any || jmp_any) ? (win_max - win_min) : '0;
  end

  assign discard = (win_range > RANGE_THRESH);
  assign keep    = !discard;

  feature_lane #(.N_W(N_W)) u_mem_lane (
    .clk, .rst_n,
    .sel_valid(mem_valid), .sel_pc(mem_pc), .sel_cnt(mem_cnt),
    .win_end, .decide(decide_q), .keep, .acc_clear(discard),
    .closed_any(mem_any), .closed_min(mem_min), .closed_max(mem_max),
    .acc_sum_pc(mem_sum_pc), .acc_n_pc(mem_n_pc),
    .acc_sum_int(mem_sum_int), .acc_n_int(mem_n_int)
  );

  feature_lane #(.N_W(N_W)) u_jmp_lane (
    .clk, .rst_n,
    .sel_valid(jmp_valid), .sel_pc(jmp_pc), .sel_cnt(jmp_cnt),
    .win_end, .decide(decide_q), .keep, .acc_clear(discard),
    .closed_any(jmp_any), .closed_min(jmp_min), .closed_max(jmp_max),
    .acc_sum_pc(jmp_sum_pc), .acc_n_pc(jmp_n_pc),
    .acc_sum_int(jmp_sum_int), .acc_n_int(jmp_n_int)
  );

  // A function ends at a discarded window that follows kept data.
  assign emit = decide_q && discard && ((mem_n_pc != '0) || (jmp_n_pc != '0));

  logic [NDIM-1:0]  div_busy, div_done;
  logic [SUM_W-1:0] div_q [NDIM];
  logic [SUM_W-1:0] div_num [NDIM];
  logic [N_W-1:0]   div_den [NDIM];
  logic             div_start;

  assign div_start = emit;

  if (2 ** WIN_LOG2 <= SUM_W + 1) begin : g_win_check
    $error("feature_extractor: window shorter than the divider latency");
  end
  assign div_num[0] = mem_sum_pc;   assign div_den[0] = mem_n_pc;
  assign div_num[1] = mem_sum_int;  assign div_den[1] = mem_n_int;
  assign div_num[2] = jmp_sum_pc;   assign div_den[2] = jmp_n_pc;
  assign div_num[3] = jmp_sum_int;  assign div_den[3] = jmp_n_int;

  for (genvar d = 0; d < NDIM; d++) begin : g_div
    seq_divider #(.DIVIDEND_W(SUM_W), .DIVISOR_W(N_W)) u_div (
      .clk, .rst_n,
      .start(div_start), .dividend(div_num[d]), .divisor(div_den[d]),
      .busy(div_busy[d]), .done(div_done[d]), .quotient(div_q[d])
    );
    // An average of FEAT_W-bit values fits in FEAT_W bits.
    assign sample[d] = div_q[d][FEAT_W-1:0];
  end

  assign sample_valid = div_done[0];

  // A run can only end once per window, long after the dividers finished.
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n) emit |-> (div_busy == '0))
    else $error("feature_extractor: sample requested while the dividers are busy");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_kept       <= 1'b0;
      win_discarded  <= 1'b0;
    end else begin
      win_kept       <= decide_q && keep;
      win_discarded  <= decide_q && discard;
    end
  end

endmodule
