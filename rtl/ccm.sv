// ccm: Continuous Collection Module.
//
// Sits on the processor's debug trace port and turns each retired
// instruction into a frame {instruction, PC, clock count}. A free-running
// counter, cleared by reset, gives the time since reset. The frame stream is
// non-blocking: there is no ready signal, a frame is produced in the cycle
// after the trace reports an instruction and downstream logic must take it.
//
// Interface: trace_valid/trace_pc/trace_instr are sampled every cycle (one
// retired instruction per cycle at most). frame_valid/frame come out one
// cycle later; frame.cnt is the count of the cycle the instruction was seen.
// now_cnt is that same counter, registered alongside the frame so that
// downstream time windows and frame stamps are in step: when frame_valid is
// high, frame.cnt == now_cnt.
//
// The collector and its clock counter follow the published design. The
// trace port format is this design's own: a generic retirement trace
// (valid, PC, instruction), which any core's debug/verification trace can be
// reduced to.
module ccm
  import nirvana_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trace_valid,
  input  logic [XLEN-1:0]   trace_pc,
  input  logic [XLEN-1:0]   trace_instr,
  output logic              frame_valid,
  output frame_t            frame,
  output logic [CNT_W-1:0]  now_cnt
);

  logic [CNT_W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q       <= '0;
      now_cnt     <= '0;
      frame_valid <= 1'b0;
      frame       <= '0;
    end else begin
      cnt_q       <= cnt_q + 1'b1;
      now_cnt     <= cnt_q;
      frame_valid <= trace_valid;
      if (trace_valid) begin
        frame.instr <= trace_instr;
        frame.pc    <= trace_pc;
        frame.cnt   <= cnt_q;
      end
    end
  end

endmodule
