// tb_feature_lane: self-checking test of one feature lane.
// Random selected frames (random PCs inside a random code region, rising
// clock counts) are fed through windows of random length. A reference model
// in the bench keeps the window's PC min/max/sum and neighbour intervals;
// after each window end the closed PC extremes are checked, and after each
// decision (random keep / clear) the four accumulators are checked.
module tb_feature_lane;
  import nirvana_pkg::*;

  localparam int unsigned N_W = 24;
  logic clk = 0, rst_n = 0;
  logic sel_valid = 0, win_end = 0, decide = 0, keep = 0, acc_clear = 0;
  logic [XLEN-1:0]  sel_pc = '0;
  logic [CNT_W-1:0] sel_cnt = '0;
  logic             closed_any;
  logic [XLEN-1:0]  closed_min, closed_max;
  logic [XLEN+N_W-1:0] acc_sum_pc, acc_sum_int;
  logic [N_W-1:0]      acc_n_pc, acc_n_int;
  int checks = 0, failures = 0;

  feature_lane #(.N_W(N_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  longint unsigned w_min, w_max, w_sum, w_n, w_isum, w_in, last_t;
  longint unsigned c_min, c_max, c_sum, c_n, c_isum, c_in;
  longint unsigned a_sum, a_n, a_isum, a_in;
  longint unsigned t;
  int kept = 0, cleared = 0;

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    w_min = 0; w_max = 0; w_sum = 0; w_n = 0; w_isum = 0; w_in = 0; last_t = 0;
    a_sum = 0; a_n = 0; a_isum = 0; a_in = 0; t = 100;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      int len;
      longint unsigned base, span;
      len  = $urandom_range(2, 60);
      base = 64'h8000_0000 + 4 * $urandom_range(0, 4096);
      span = (w % 3 == 0) ? 64'h10000 : 64'h200;
      for (int c = 0; c < len; c++) begin
        logic v;
        longint unsigned pc;
        v  = ($urandom_range(0, 2) == 0);
        pc = base + 2 * $urandom_range(0, int'(span / 2));
        sel_valid = v;
        sel_pc    = XLEN'(pc);
        t += 1;
        sel_cnt   = CNT_W'(t);
        win_end   = (c == len - 1);
        decide = 0;
        if (v) begin
          if (w_n == 0) begin
            w_min = pc; w_max = pc;
          end else begin
            if (pc < w_min) w_min = pc;
            if (pc > w_max) w_max = pc;
            w_isum += t - last_t;
            w_in++;
          end
          w_sum += pc; w_n++; last_t = t;
        end
        @(posedge clk);
        @(negedge clk);
      end
      // closed set = window
      c_min = w_min; c_max = w_max; c_sum = w_sum; c_n = w_n; c_isum = w_isum; c_in = w_in;
      w_min = 0; w_max = 0; w_sum = 0; w_n = 0; w_isum = 0; w_in = 0;
      check("closed_any", closed_any, (c_n != 0));
      if (c_n != 0) begin
        check("closed_min", closed_min, c_min);
        check("closed_max", closed_max, c_max);
      end
      // decision cycle
      sel_valid = 0; win_end = 0; t += 1; sel_cnt = CNT_W'(t);
      decide    = 1;
      keep      = $urandom_range(0, 3) != 0;
      acc_clear = $urandom_range(0, 5) == 0;
      if (acc_clear) begin
        a_sum = 0; a_n = 0; a_isum = 0; a_in = 0; cleared++;
      end else if (keep) begin
        a_sum += c_sum; a_n += c_n; a_isum += c_isum; a_in += c_in; kept++;
      end
      @(posedge clk);
      @(negedge clk);
      decide = 0;
      check("acc_sum_pc", acc_sum_pc, a_sum);
      check("acc_n_pc", acc_n_pc, a_n);
      check("acc_sum_int", acc_sum_int, a_isum);
      check("acc_n_int", acc_n_int, a_in);
    end
    if (kept == 0 || cleared == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
