// som_train_mem: buffer of training samples for the SOM.
//
// A simple dual-port memory of DEPTH feature samples: one synchronous write
// port, fed by the feature extractor while the training set is collected,
// and one synchronous read port used by the trainer to fetch the randomly
// chosen training point (rdata valid the cycle after raddr). Written as a
// plain array so that it maps to block RAM. The default depth of 512 holds
// the 257-sample data set of the published evaluation; the depth itself is
// this design's choice.
module som_train_mem
  import nirvana_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  sample_t       wdata,
  input  logic [AW-1:0] raddr,
  output sample_t       rdata
);

  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
