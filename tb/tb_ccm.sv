// tb_ccm: self-checking test of the continuous collection module.
// Drives a random retirement trace (about half the cycles valid) and checks,
// one cycle later, the frame contents, frame_valid, and that the clock count
// equals the number of cycles since reset (reference counter in the bench).
module tb_ccm;
  import nirvana_pkg::*;

  logic clk = 0, rst_n = 0;
  logic trace_valid = 0;
  logic [XLEN-1:0] trace_pc = '0, trace_instr = '0;
  logic frame_valid;
  frame_t frame;
  logic [CNT_W-1:0] now_cnt;
  int checks = 0, failures = 0;

  ccm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic             exp_v;
  logic [XLEN-1:0]  exp_pc, exp_in;
  longint unsigned  cyc;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cyc = 0;
    for (int i = 0; i < 2000; i++) begin
      // drive before the edge
      trace_valid = $urandom_range(0, 1) == 1;
      trace_pc    = $urandom;
      trace_instr = $urandom;
      exp_v  = trace_valid;
      exp_pc = trace_pc;
      exp_in = trace_instr;
      @(posedge clk);
      #1;
      checks++;
      if (now_cnt != CNT_W'(cyc)) begin
        failures++;
        if (failures < 5) $display("now_cnt %0d expected %0d", now_cnt, cyc);
      end
      checks++;
      if (frame_valid != exp_v) failures++;
      if (exp_v) begin
        checks++;
        if (frame.pc != exp_pc || frame.instr != exp_in || frame.cnt != CNT_W'(cyc)) begin
          failures++;
          if (failures < 5) $display("frame mismatch pc %h/%h cnt %0d/%0d", frame.pc, exp_pc, frame.cnt, cyc);
        end
      end
      cyc++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
