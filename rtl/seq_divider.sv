// seq_divider: unsigned restoring divider, one quotient bit per cycle.
//
// Used by the feature extractor to turn accumulated sums into averages.
// start (while not busy) latches dividend and divisor; DIVIDEND_W cycles
// later done pulses for one cycle with quotient valid (it then holds until
// the next start). A zero divisor gives a zero quotient. The method does not
// say how the averages are divided out; a bit-serial divider is this
// design's choice, since one average per algorithm run needs no speed.
module seq_divider #(
  parameter int unsigned DIVIDEND_W = 56,
  parameter int unsigned DIVISOR_W  = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [DIVIDEND_W-1:0] dividend,
  input  logic [DIVISOR_W-1:0]  divisor,
  output logic                  busy,
  output logic                  done,
  output logic [DIVIDEND_W-1:0] quotient
);

  localparam int unsigned STEP_W = $clog2(DIVIDEND_W + 1);

  logic [DIVISOR_W:0]    rem_q;     // one spare bit for the shifted remainder
  logic [DIVIDEND_W-1:0] quo_q;     // shifts dividend out, quotient in
  logic [DIVISOR_W-1:0]  dvs_q;
  logic [STEP_W-1:0]     step_q;
  logic                  zero_q;

  logic [DIVISOR_W:0]    rem_sh;
  logic                  ge;

  always_comb begin
    rem_sh = {rem_q[DIVISOR_W-1:0], quo_q[DIVIDEND_W-1]};
    ge     = (rem_sh >= {1'b0, dvs_q});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q    <= '0;
      quo_q    <= '0;
      dvs_q    <= '0;
      step_q   <= '0;
      zero_q   <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem_q  <= '0;
          quo_q  <= dividend;
          dvs_q  <= divisor;
          zero_q <= (divisor == '0);
          step_q <= '0;
          busy   <= 1'b1;
        end
      end else begin
        rem_q <= ge ? (rem_sh - {1'b0, dvs_q}) : rem_sh;
        quo_q <= {quo_q[DIVIDEND_W-2:0], ge};
        if (step_q == STEP_W'(DIVIDEND_W - 1)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= zero_q ? '0 : {quo_q[DIVIDEND_W-2:0], ge};
        end
        step_q <= step_q + 1'b1;
      end
    end
  end

endmodule
