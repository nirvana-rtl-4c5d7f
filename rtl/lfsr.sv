// lfsr: Fibonacci linear-feedback shift register used as the random source
// of the SOM trainer (random initial weights, random choice of the training
// point). 64-bit maximal-length polynomial x^64 + x^63 + x^61 + x^60 + 1;
// the register advances STEPS bit positions per enabled cycle so that the
// words taken from it in consecutive cycles do not overlap. It resets to
// SEED, which must not be zero. The method only asks for random values;
// the LFSR, its polynomial and seed are this design's choice.
module lfsr #(
  parameter int unsigned STEPS = 16,
  parameter logic [63:0] SEED  = 64'hACE1_2468_9BDF_1357
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [63:0] value
);

  logic [63:0] nxt;

  always_comb begin
    nxt = value;
    for (int s = 0; s < STEPS; s++) begin
      nxt = {nxt[62:0], nxt[63] ^ nxt[62] ^ nxt[60] ^ nxt[59]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  value <= SEED;
    else if (en) value <= nxt;
  end

endmodule
