// som_classifier: self-organizing-map classifier with on-chip training.
//
// The map is NN neurons, each a 4-D weight vector held in registers. The
// classifier has three phases, chosen by its inputs:
//  * collect (collect=1): each feature sample is appended to the training
//    buffer (som_train_mem); the per-dimension minimum and maximum of the
//    stored set are tracked. clear_set empties the set.
//  * train (train_start pulse): the weights are first set to random values
//    spread uniformly over the range of the stored data, one neuron per
//    cycle (w = min + (r*(max-min) >> 16), r a 16-bit random number). Then,
//    for ITER_MULT * n_samples iterations: a random stored sample K is read,
//    the distance pipeline finds the winning neuron, the L1 distances M from
//    the winner to every neuron are formed (the winner's row of the distance
//    matrix), and every neuron moves towards K:
//        w_jl += mu0 * mu1(M_j) * (K_l - w_jl)
//    with mu0 and mu1 from som_lr_lut. The random sample index is
//    (r * n_samples) >> 16 for a 16-bit random r. Every iteration takes
//    exactly 9 cycles (pick, read, issue, 5 pipeline cycles, update), so
//    training lasts NN + 9 * ITER_MULT * n_samples cycles.
//  * classify (collect=0, trained): each feature sample goes through the same
//    five-stage distance pipeline; res_valid comes 5 cycles later with the
//    nearest neuron, its distance, and res_anomaly = distance > anomaly_thresh
//    (a sample far from every learned program feature is flagged).
// Samples that arrive while training runs, or before any training, are not
// classified and pulse infer_dropped; a sample offered to a full set pulses
// set_full. train_start is taken only when the pipeline is empty and the
// set is non-empty.
//
// The L1 distance, the argmin, the neighbour update driven by the distance
// matrix, the stepped learning rates, twice as many iterations as training
// samples and twice as many neurons (14) as the seven expected programs are
// published choices. The update rule adds the step towards K; the printed
// rule subtracts it, which would push neurons away from the data and never
// converge, so the standard SOM sign is used. The initial-weight range, the
// anomaly threshold and the fixed-point formats are this design's own.
module som_classifier
  import nirvana_pkg::*;
#(
  parameter int unsigned NN        = 14,
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned ITER_MULT = 2,
  parameter int unsigned NEIGH_R   = 1024,
  parameter logic [63:0] SEED      = 64'hACE1_2468_9BDF_1357,
  localparam int unsigned IDX_W  = (NN > 1) ? $clog2(NN) : 1,
  localparam int unsigned DIST_W = FEAT_W + $clog2(NDIM),
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned ITER_W = $clog2(DEPTH * ITER_MULT) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample_valid,
  input  sample_t            sample,
  input  logic               collect,
  input  logic               clear_set,
  input  logic               train_start,
  input  logic [DIST_W-1:0]  anomaly_thresh,
  output logic               training,
  output logic               trained,
  output logic [AW:0]        n_samples,
  output logic [ITER_W-1:0]  iter,
  output logic               res_valid,
  output logic [IDX_W-1:0]   res_idx,
  output logic [DIST_W-1:0]  res_dist,
  output logic               res_anomaly,
  output logic               set_full,
  output logic               infer_dropped,
  output sample_t [NN-1:0]   weights
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_PICK, S_READ, S_DIST, S_WAIT, S_UPDATE}
    state_e;

  state_e            state_q;
  logic [IDX_W-1:0]  init_j_q;
  logic [ITER_W-1:0] total_q;
  sample_t           k_q;
  logic [IDX_W-1:0]  win_q;
  feat_t [NDIM-1:0]  dmin_q, dmax_q;

  // ---------------------------------------------------------------- storage
  logic    mem_we;
  sample_t mem_rdata;
  logic [AW-1:0] mem_raddr;
  logic [63:0]   rnd;

  assign mem_we = sample_valid && collect && !training && (n_samples < (AW+1)'(DEPTH));

  som_train_mem #(.DEPTH(DEPTH)) u_mem (
    .clk, .we(mem_we), .waddr(n_samples[AW-1:0]), .wdata(sample),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );

  lfsr #(.STEPS(16), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .en(1'b1), .value(rnd)
  );

  // Random training index, uniform over the stored set: (r16 * n) >> 16.
  logic [AW+16:0] pick_prod;
  assign pick_prod = rnd[63:48] * n_samples;
  assign mem_raddr = pick_prod[AW+15:16];

  // ------------------------------------------------------- distance pipeline
  logic              pipe_in_valid, pipe_in_tag;
  sample_t           pipe_in;
  logic              pipe_out_valid, pipe_out_tag, pipe_busy;
  logic [IDX_W-1:0]  pipe_idx;
  logic [DIST_W-1:0] pipe_dist;
  logic              infer_req;

  assign infer_req     = sample_valid && !collect && trained && (state_q == S_IDLE);
  assign pipe_in_valid = (state_q == S_DIST) || infer_req;
  assign pipe_in_tag   = (state_q == S_DIST);          // 1 = training lookup
  assign pipe_in       = (state_q == S_DIST) ? k_q : sample;

  som_dist_pipe #(.NN(NN)) u_pipe (
    .clk, .rst_n,
    .in_valid(pipe_in_valid), .in_tag(pipe_in_tag), .in_sample(pipe_in),
    .weights(weights),
    .out_valid(pipe_out_valid), .out_tag(pipe_out_tag),
    .out_idx(pipe_idx), .out_dist(pipe_dist), .busy(pipe_busy)
  );

  // Inference results come straight from the last pipeline stage.
  assign res_valid   = pipe_out_valid && !pipe_out_tag;
  assign res_idx     = pipe_idx;
  assign res_dist    = pipe_dist;
  assign res_anomaly = (pipe_dist > anomaly_thresh);

  // Weights change only in S_INIT and S_UPDATE; no classification may be in
  // flight then, and a training lookup must find the pipeline otherwise idle.
  a_no_infer_in_training: assert property (@(posedge clk) disable iff (!rst_n)
      ((state_q == S_INIT) || (state_q == S_UPDATE)) |-> !(pipe_busy && !pipe_out_tag))
    else $error("som_classifier: weights changed under a classification");

  // ------------------------------------------- winner row of distance matrix
  logic [NN-1:0][DIST_W-1:0] mrow;
  logic [7:0]                mu0;
  logic [NN-1:0][1:0]        mu1_shift;
  feat_t                     absd;

  always_comb begin
    for (int j = 0; j < NN; j++) begin
      mrow[j] = '0;
      for (int l = 0; l < NDIM; l++) begin
        absd    = (weights[win_q][l] > weights[j][l])
                  ? (weights[win_q][l] - weights[j][l])
                  : (weights[j][l] - weights[win_q][l]);
        mrow[j] = mrow[j] + DIST_W'(absd);
      end
    end
  end

  som_lr_lut #(.NN(NN), .ITER_W(ITER_W), .NEIGH_R(NEIGH_R)) u_lut (
    .iter, .total(total_q), .ndist(mrow), .mu0, .mu1_shift
  );

  // ------------------------------------------------------ weight arithmetic
  sample_t [NN-1:0] w_upd, w_init;
  logic signed [FEAT_W:0]    diff;
  logic signed [FEAT_W+9:0]  prod;
  logic signed [FEAT_W+9:0]  step;
  logic [FEAT_W-1:0]         span;
  logic [FEAT_W+15:0]        scaled;

  always_comb begin
    for (int j = 0; j < NN; j++) begin
      for (int l = 0; l < NDIM; l++) begin
        diff = $signed({1'b0, k_q[l]}) - $signed({1'b0, weights[j][l]});
        prod = diff * $signed({2'b00, mu0});
        step = (mu1_shift[j] == 2'd3) ? '0 : ((prod >>> 8) >>> mu1_shift[j]);
        w_upd[j][l] = weights[j][l] + step[FEAT_W-1:0];
      end
    end
    for (int j = 0; j < NN; j++) begin
      for (int l = 0; l < NDIM; l++) begin
        span   = dmax_q[l] - dmin_q[l];
        scaled = rnd[16*l +: 16] * span;
        w_init[j][l] = dmin_q[l] + scaled[FEAT_W+15:16];
      end
    end
  end

  // ------------------------------------------------------------- controller
  assign training = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      trained       <= 1'b0;
      n_samples     <= '0;
      iter          <= '0;
      total_q       <= '0;
      init_j_q      <= '0;
      k_q           <= '0;
      win_q         <= '0;
      dmin_q        <= '0;
      dmax_q        <= '0;
      weights       <= '0;
      set_full      <= 1'b0;
      infer_dropped <= 1'b0;
    end else begin
      set_full      <= sample_valid && collect && !training && !mem_we;
      infer_dropped <= sample_valid && !collect && !infer_req;

      // Training-set bookkeeping
      if (clear_set && !training) begin
        n_samples <= '0;
      end else if (mem_we) begin
        n_samples <= n_samples + 1'b1;
        for (int l = 0; l < NDIM; l++) begin
          if (n_samples == '0 || sample[l] < dmin_q[l]) dmin_q[l] <= sample[l];
          if (n_samples == '0 || sample[l] > dmax_q[l]) dmax_q[l] <= sample[l];
        end
      end

      unique case (state_q)
        S_IDLE: begin
          if (train_start && !pipe_busy && (n_samples != '0)) begin
            state_q  <= S_INIT;
            init_j_q <= '0;
            iter     <= '0;
            total_q  <= ITER_W'(n_samples) * ITER_W'(ITER_MULT);
            trained  <= 1'b0;
          end
        end
        S_INIT: begin
          weights[init_j_q] <= w_init[init_j_q];
          init_j_q <= init_j_q + 1'b1;
          if (init_j_q == IDX_W'(NN - 1)) state_q <= S_PICK;
        end
        S_PICK: begin
          // the memory latches the random index mem_raddr this cycle
          state_q <= S_READ;
        end
        S_READ: begin
          k_q     <= mem_rdata;
          state_q <= S_DIST;
        end
        S_DIST: begin
          state_q <= S_WAIT;
        end
        S_WAIT: begin
          if (pipe_out_valid && pipe_out_tag) begin
            win_q   <= pipe_idx;
            state_q <= S_UPDATE;
          end
        end
        S_UPDATE: begin
          weights <= w_upd;
          iter    <= iter + 1'b1;
          if (iter + 1'b1 == total_q) begin
            state_q <= S_IDLE;
            trained <= 1'b1;
          end else begin
            state_q <= S_PICK;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
