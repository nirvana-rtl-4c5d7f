// nirvana_top: non-invasive run-time anomaly detector for a RISC-V core.
//
// The detector listens to the core's retirement trace (PC and instruction
// only) and never stalls or alters the core. Data flow:
//   ccm               stamps each retired instruction with a clock count
//   insn_filter x2    selects load/store frames and unconditional-jump frames
//   feature_extractor cuts time into windows, drops windows that contain a
//                     long top-level jump (an algorithm switch) and
//                     summarises each algorithm run as a 4-D feature sample
//   som_classifier    stores samples of known-good runs, trains a
//                     self-organizing map on them, then classifies new
//                     samples and flags those far from every neuron.
//
// Control: collect=1 routes feature samples into the training set;
// train_start trains the map on it; with collect=0 each sample is classified
// and res_valid/res_idx/res_dist/res_anomaly report the nearest neuron
// five cycles after the sample. anomaly_thresh is the L1 distance above
// which a sample counts as abnormal. The status pulses (win_kept,
// win_discarded, set_full, infer_dropped) are for
// monitoring. The structure follows the published system; the trace port
// format, widths and all thresholds are this design's own choices.
module nirvana_top
  import nirvana_pkg::*;
#(
  parameter int unsigned     WIN_LOG2     = 10,
  parameter logic [XLEN-1:0] RANGE_THRESH = 32'h0000_1000,
  parameter int unsigned     NN           = 14,
  parameter int unsigned     DEPTH        = 512,
  parameter int unsigned     ITER_MULT    = 2,
  parameter int unsigned     NEIGH_R      = 1024,
  localparam int unsigned IDX_W  = (NN > 1) ? $clog2(NN) : 1,
  localparam int unsigned DIST_W = FEAT_W + $clog2(NDIM),
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // retirement trace of the monitored core
  input  logic              trace_valid,
  input  logic [XLEN-1:0]   trace_pc,
  input  logic [XLEN-1:0]   trace_instr,
  // control
  input  logic              collect,
  input  logic              clear_set,
  input  logic              train_start,
  input  logic [DIST_W-1:0] anomaly_thresh,
  // feature samples
  output logic              sample_valid,
  output sample_t           sample,
  // classification
  output logic              res_valid,
  output logic [IDX_W-1:0]  res_idx,
  output logic [DIST_W-1:0] res_dist,
  output logic              res_anomaly,
  // status
  output logic              training,
  output logic              trained,
  output logic [AW:0]       n_samples,
  output logic              win_kept,
  output logic              win_discarded,
  output logic              set_full,
  output logic              infer_dropped
);

  logic             frame_valid;
  frame_t           frame;
  logic [CNT_W-1:0] now_cnt;
  logic             mem_valid, jmp_valid;
  logic [XLEN-1:0]  mem_pc, jmp_pc;
  logic [CNT_W-1:0] mem_cnt, jmp_cnt;

  ccm u_ccm (
    .clk, .rst_n,
    .trace_valid, .trace_pc, .trace_instr,
    .frame_valid, .frame, .now_cnt
  );

  insn_filter #(.CLASS(CLASS_MEMIO)) u_mem_filter (
    .frame_valid, .frame,
    .sel_valid(mem_valid), .sel_pc(mem_pc), .sel_cnt(mem_cnt)
  );

  insn_filter #(.CLASS(CLASS_JUMP)) u_jmp_filter (
    .frame_valid, .frame,
    .sel_valid(jmp_valid), .sel_pc(jmp_pc), .sel_cnt(jmp_cnt)
  );

  feature_extractor #(.WIN_LOG2(WIN_LOG2), .RANGE_THRESH(RANGE_THRESH)) u_fx (
    .clk, .rst_n, .now_cnt,
    .mem_valid, .mem_pc, .mem_cnt,
    .jmp_valid, .jmp_pc, .jmp_cnt,
    .sample_valid, .sample,
    .win_kept, .win_discarded
  );

  sample_t [NN-1:0] weights;
  logic [$clog2(DEPTH * ITER_MULT):0] iter;

  som_classifier #(.NN(NN), .DEPTH(DEPTH), .ITER_MULT(ITER_MULT), .NEIGH_R(NEIGH_R)) u_som (
    .clk, .rst_n,
    .sample_valid, .sample,
    .collect, .clear_set, .train_start, .anomaly_thresh,
    .training, .trained, .n_samples, .iter,
    .res_valid, .res_idx, .res_dist, .res_anomaly,
    .set_full, .infer_dropped, .weights
  );

endmodule
