// som_dist_pipe: pipelined nearest-neuron search of the SOM.
//
// For a 4-D input K it computes the Manhattan (L1) distance to every neuron,
//   D_j = sum_l |K_l - w_jl|,
// and returns the index and distance of the nearest neuron (lowest index on
// a tie). L1 replaces the Euclidean distance so that no multiplier or square
// root is needed. The work is split into five registered stages so that one
// new input can enter every cycle:
//   1 register the input      2 |K_l - w_jl| for all j, l
//   3 sum over l -> D_j       4 minimum within groups of four neurons
//   5 minimum over the groups -> out_idx, out_dist
// An input with in_valid in cycle t gives out_valid in cycle t+5, which is
// the five-cycle inference latency of the published design. The weights are
// read in stage 2 and must not change while an input is in flight (busy
// reports any stage occupied). in_tag travels with the input unchanged.
// The grouping of the argmin into two stages is this design's choice.
module som_dist_pipe
  import nirvana_pkg::*;
#(
  parameter int unsigned NN = 14,
  localparam int unsigned IDX_W  = (NN > 1) ? $clog2(NN) : 1,
  localparam int unsigned DIST_W = FEAT_W + $clog2(NDIM)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_tag,
  input  sample_t             in_sample,
  input  sample_t [NN-1:0]    weights,
  output logic                out_valid,
  output logic                out_tag,
  output logic [IDX_W-1:0]    out_idx,
  output logic [DIST_W-1:0]   out_dist,
  output logic                busy
);

  localparam int unsigned NG = (NN + 3) / 4;   // groups in stage 4

  logic [4:0] v_q, t_q;

  // Stage 1
  sample_t s1_k;
  // Stage 2
  feat_t [NN-1:0][NDIM-1:0] s2_ad;
  // Stage 3
  logic [DIST_W-1:0] s3_d [NN];
  // Stage 4
  logic [DIST_W-1:0] s4_d [NG];
  logic [IDX_W-1:0]  s4_i [NG];

  logic [DIST_W-1:0] g_d [NG];
  logic [IDX_W-1:0]  g_i [NG];
  logic [DIST_W-1:0] f_d;
  logic [IDX_W-1:0]  f_i;
  logic [DIST_W-1:0] sum_d [NN];

  always_comb begin
    for (int j = 0; j < NN; j++) begin
      sum_d[j] = '0;
      for (int l = 0; l < NDIM; l++) sum_d[j] = sum_d[j] + DIST_W'(s2_ad[j][l]);
    end
    for (int g = 0; g < NG; g++) begin
      g_d[g] = s3_d[4*g];
      g_i[g] = IDX_W'(4*g);
      for (int m = 1; m < 4; m++) begin
        if ((4*g + m < NN) && (s3_d[(4*g+m) % NN] < g_d[g])) begin
          g_d[g] = s3_d[(4*g+m) % NN];
          g_i[g] = IDX_W'(4*g + m);
        end
      end
    end
    f_d = s4_d[0];
    f_i = s4_i[0];
    for (int g = 1; g < NG; g++) begin
      if (s4_d[g] < f_d) begin
        f_d = s4_d[g];
        f_i = s4_i[g];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      t_q <= '0;
    end else begin
      v_q <= {v_q[3:0], in_valid};
      t_q <= {t_q[3:0], in_tag};
    end
  end

  always_ff @(posedge clk) begin
    s1_k <= in_sample;
    for (int j = 0; j < NN; j++) begin
      for (int l = 0; l < NDIM; l++) begin
        s2_ad[j][l] <= (s1_k[l] > weights[j][l]) ? (s1_k[l] - weights[j][l])
                                                 : (weights[j][l] - s1_k[l]);
      end
      s3_d[j] <= sum_d[j];
    end
    for (int g = 0; g < NG; g++) begin
      s4_d[g] <= g_d[g];
      s4_i[g] <= g_i[g];
    end
    out_idx  <= f_i;
    out_dist <= f_d;
  end

  assign out_valid = v_q[4];
  assign out_tag   = t_q[4];
  assign busy      = |v_q;

endmodule
