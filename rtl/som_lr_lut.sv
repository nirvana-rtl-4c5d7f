// som_lr_lut: step-based learning rates of the SOM trainer.
//
// mu0, the time-decaying rate, follows an eight-segment staircase from 0.5
// down to 0 over the training run. The segment is the number of k in 1..7
// with 8*iter >= k*total, so no divider is needed; the eight rates are a
// table in Q0.8 fixed point: round(128*(7-k)/7) = 128 110 91 73 55 37 18 0.
// mu1, the neighbourhood rate, depends on the L1 distance M between a neuron
// and the winning neuron and falls exponentially in four segments from 1 to
// 0: 1 for M < R, 1/2 for M < 2R, 1/4 for M < 4R, 0 beyond. It is returned as
// a shift code (0,1,2 = shift right by that much, 3 = no update).
// Purely combinational; one mu0 for the whole array and one mu1 per neuron.
//
// The eight-segment linear mu0 from 0.5 to 0 and the four-segment
// exponential mu1 from 1 to 0 are the published schedules; the segment
// boundaries and the radius R (NEIGH_R) are this design's assumptions.
module som_lr_lut
  import nirvana_pkg::*;
#(
  parameter int unsigned NN      = 14,
  parameter int unsigned ITER_W  = 16,
  parameter int unsigned NEIGH_R = 1024,
  localparam int unsigned DIST_W = FEAT_W + $clog2(NDIM)
) (
  input  logic [ITER_W-1:0]           iter,
  input  logic [ITER_W-1:0]           total,
  input  logic [NN-1:0][DIST_W-1:0]   ndist,
  output logic [7:0]                  mu0,
  output logic [NN-1:0][1:0]          mu1_shift
);

  localparam logic [7:0] MU0_TAB [8] = '{8'd128, 8'd110, 8'd91, 8'd73,
                                         8'd55,  8'd37,  8'd18, 8'd0};

  logic [2:0]        seg;
  logic [ITER_W+2:0] iter8;

  always_comb begin
    iter8 = {iter, 3'b000};
    seg   = '0;
    for (int k = 1; k < 8; k++) begin
      if (iter8 >= (ITER_W+3)'(k) * {3'b000, total}) seg = seg + 1'b1;
    end
    mu0 = MU0_TAB[seg];

    for (int j = 0; j < NN; j++) begin
      if (ndist[j] < DIST_W'(NEIGH_R))          mu1_shift[j] = 2'd0;
      else if (ndist[j] < DIST_W'(2 * NEIGH_R)) mu1_shift[j] = 2'd1;
      else if (ndist[j] < DIST_W'(4 * NEIGH_R)) mu1_shift[j] = 2'd2;
      else                                      mu1_shift[j] = 2'd3;
    end
  end

endmodule
