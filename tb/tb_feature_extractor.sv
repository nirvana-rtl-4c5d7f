// tb_feature_extractor: self-checking test of the feature extractor at its
// default window length (1024 cycles) and PC-range threshold (4 KiB).
// A synthetic program runs a sequence of "algorithms", each in its own 1 KiB
// code region 64 KiB apart, for a random number of cycles; the change from
// one algorithm to the next puts far-apart PCs into one window. A reference
// model in the bench keeps the same per-window statistics, applies the
// range rule and predicts every feature sample (floor averages). Each DUT
// sample is compared with the prediction and must appear 57 cycles after
// the cycle that follows the discarded window. A short algorithm that
// fits in no whole window must produce no sample, and an algorithm without
// loads or stores must be delimited by the jump lane alone. The range is
// taken over both instruction types together.
module tb_feature_extractor;
  import nirvana_pkg::*;

  localparam int unsigned WIN = 1024;
  localparam longint unsigned TH = 64'h1000;

  logic clk = 0, rst_n = 0;
  logic [CNT_W-1:0] now_cnt = '0;
  logic mem_valid = 0, jmp_valid = 0;
  logic [XLEN-1:0] mem_pc = '0, jmp_pc = '0;
  logic [CNT_W-1:0] mem_cnt, jmp_cnt;
  logic sample_valid, win_kept, win_discarded;
  sample_t sample;
  int checks = 0, failures = 0;

  assign mem_cnt = now_cnt;
  assign jmp_cnt = now_cnt;

  feature_extractor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference statistics: index 0 = memory lane, 1 = jump lane
  longint unsigned wmin[2], wmax[2], wsum[2], wn[2], wis[2], win_[2], last[2];
  longint unsigned asum[2], an[2], ais[2], ain[2];
  longint unsigned exp_q[$];      // 4 values per expected sample
  longint unsigned exp_cyc[$];    // cycle the sample is expected in
  longint unsigned cyc = 0;
  int got = 0, n_disc = 0, n_keep = 0;

  task automatic ref_frame(int lane, longint unsigned pc, longint unsigned t);
    if (wn[lane] == 0) begin
      wmin[lane] = pc; wmax[lane] = pc;
    end else begin
      if (pc < wmin[lane]) wmin[lane] = pc;
      if (pc > wmax[lane]) wmax[lane] = pc;
      wis[lane] += t - last[lane];
      win_[lane]++;
    end
    wsum[lane] += pc; wn[lane]++; last[lane] = t;
  endtask

  task automatic ref_close(longint unsigned t_decide);
    longint unsigned lo, hi;
    bit disc, any;
    any = 0; lo = 0; hi = 0;
    for (int l = 0; l < 2; l++) if (wn[l] != 0) begin
      if (!any || wmin[l] < lo) lo = wmin[l];
      if (!any || wmax[l] > hi) hi = wmax[l];
      any = 1;
    end
    // range over the selected frames of both types
    disc = any && (hi - lo > TH);
    if (disc) begin
      if (an[0] != 0 || an[1] != 0) begin
        begin
          exp_q.push_back((an[0] == 0) ? 0 : asum[0] / an[0]);
          exp_q.push_back((ain[0] == 0) ? 0 : ais[0] / ain[0]);
          exp_q.push_back((an[1] == 0) ? 0 : asum[1] / an[1]);
          exp_q.push_back((ain[1] == 0) ? 0 : ais[1] / ain[1]);
          exp_cyc.push_back(t_decide + 57);
        end
      end
      for (int l = 0; l < 2; l++) begin asum[l] = 0; an[l] = 0; ais[l] = 0; ain[l] = 0; end
    end else begin
      for (int l = 0; l < 2; l++) begin
        asum[l] += wsum[l]; an[l] += wn[l]; ais[l] += wis[l]; ain[l] += win_[l];
      end
    end
    for (int l = 0; l < 2; l++) begin
      wmin[l] = 0; wmax[l] = 0; wsum[l] = 0; wn[l] = 0; wis[l] = 0; win_[l] = 0;
    end
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n) begin
      if (win_kept) n_keep++;
      if (win_discarded) n_disc++;
      if (sample_valid) begin
        got++;
        checks++;
        if (exp_cyc.size() == 0) begin
          failures++;
          $display("unexpected sample at cycle %0d", cyc);
        end else begin
          longint unsigned e[4];
          longint unsigned ec;
          for (int d = 0; d < 4; d++) e[d] = exp_q.pop_front();
          ec = exp_cyc.pop_front();
          for (int d = 0; d < 4; d++) begin
            checks++;
            if (longint'(sample[d]) != e[d]) begin
              failures++;
              if (failures < 10) $display("sample %0d dim %0d: got %0d expected %0d", got, d, sample[d], e[d]);
            end
          end
          checks++;
          if (cyc != ec) begin
            failures++;
            $display("sample %0d at cycle %0d, expected %0d", got, cyc, ec);
          end
        end
      end
    end
  end

  task automatic run_func(int f, int ncyc, bit mem_on = 1, longint unsigned jmp_off = 0);
    longint unsigned base;
    base = 64'h8000_0000 + 64'h10000 * longint'(f);
    for (int c = 0; c < ncyc; c++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, 99);
      mem_valid = (r < 30) && mem_on;
      jmp_valid = (r >= 30 && r < 40);
      // the first instruction of a function is the long jump into it
      if (c == 0) begin mem_valid = 0; jmp_valid = 1; end
      mem_pc = XLEN'(base + 4 * $urandom_range(0, 255));
      jmp_pc = XLEN'(base + jmp_off + 4 * $urandom_range(0, 255));
      if (mem_valid) ref_frame(0, mem_pc, cyc);
      if (jmp_valid) ref_frame(1, jmp_pc, cyc);
      @(posedge clk);
      #1;
      // window ends in this cycle: the decision follows next cycle
      if (now_cnt[9:0] == 10'h3ff) ref_close(cyc + 1);
      now_cnt = now_cnt + 1'b1;
      cyc++;
    end
  endtask

  initial begin
    for (int l = 0; l < 2; l++) begin
      wmin[l] = 0; wmax[l] = 0; wsum[l] = 0; wn[l] = 0; wis[l] = 0; win_[l] = 0; last[l] = 0;
      asum[l] = 0; an[l] = 0; ais[l] = 0; ain[l] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // phase 1: algorithms several windows long
    for (int k = 0; k < 12; k++) run_func(k % 5, $urandom_range(2500, 9000));
    // phase 2: a short algorithm between two long ones
    run_func(6, 3000);
    run_func(7, 1024 + 20);
    run_func(8, 3000);
    run_func(2, 3000);
    // phase 3: an algorithm without loads/stores: only the jump lane sees
    // the switches into and out of it
    run_func(3, 4000);
    run_func(4, 4000, 0);
    run_func(1, 4000);
    run_func(0, 2000);
    // phase 4: loads/stores and jumps each stay within 1 KiB but lie 8 KiB
    // apart: the range over both types together exceeds the threshold, so
    // every window of this algorithm is discarded
    run_func(5, 5000, 1, 64'h2000);
    run_func(6, 4000);
    run_func(2, 2000);
    @(negedge clk);
    mem_valid = 0; jmp_valid = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (exp_cyc.size() != 0) begin
      failures++;
      $display("%0d expected samples never appeared", exp_cyc.size());
    end
    checks++;
    if (n_keep == 0 || n_disc == 0 || got < 10) failures++;
    $display("samples=%0d kept=%0d discarded=%0d", got, n_keep, n_disc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
