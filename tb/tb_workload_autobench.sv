// tb_workload_autobench: the evaluation workload of the method, rebuilt with
// a synthetic trace, on the detector at its default parameters.
//
// Seven automotive kernels (a2time, rspeed, bitmnp, idctrn, puwmod, tblook,
// ttsprk) are stood in for by seven code regions with different load/store
// and jump mixes. Each call runs a kernel for ITERATION_COUNT iterations,
// drawn from the kernel's published range (400-1200, 5-15, 700-2100, 2-6,
// 2-6, 25-105, 500-1500); the cycles per iteration are this bench's own
// numbers, chosen so that every run spans at least two windows. Each round
// calls 1 to 4 randomly chosen kernels, as in the original evaluation, until
// 257 samples are collected. The map is then trained (2 x 257 iterations),
// every neuron is labelled with the kernel that owns most of the training
// samples it wins, and 70 new kernel runs plus 10 injected-code runs are
// classified. Checked: buffer count, iteration count and training time, every result against a
// reference nearest-neuron search, and every injected run flagged. The
// accuracy (right kernel and not flagged) is reported.
module tb_workload_autobench;
  import nirvana_pkg::*;

  localparam int NN = 14;
  localparam longint unsigned THRESH = 3000;

  logic clk = 0, rst_n = 0;
  logic trace_valid = 0;
  logic [31:0] trace_pc = '0, trace_instr = '0;
  logic collect = 1, clear_set = 0, train_start = 0;
  logic [33:0] anomaly_thresh = 34'(THRESH);
  logic sample_valid, res_valid, res_anomaly, training, trained;
  sample_t sample;
  logic [3:0] res_idx;
  logic [33:0] res_dist;
  logic [9:0] n_samples;
  logic win_kept, win_discarded, set_full, infer_dropped;
  int checks = 0, failures = 0;

  nirvana_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ITERATION_COUNT ranges per kernel, and this bench's cycles per iteration
  int it_lo[7]  = '{400, 5, 700, 2, 2, 25, 500};
  int it_hi[7]  = '{1200, 15, 2100, 6, 6, 105, 1500};
  int cyc_it[7] = '{7, 500, 4, 1400, 1300, 100, 6};

  longint unsigned cyc = 0;
  int n_train_cyc = 0;
  always @(posedge clk) if (rst_n && training) n_train_cyc++;
  int cur_algo = -1, last_algo = -1;
  sample_t train_s[$];
  int train_l[$];
  int label[NN];
  longint unsigned pend_cyc[$];
  sample_t pend_s[$];
  int pend_a[$];
  int n_res = 0, correct = 0, norm = 0, norm_flag = 0, inj = 0, inj_flag = 0;

  function automatic longint unsigned l1(sample_t a, sample_t b);
    longint unsigned d = 0;
    for (int l = 0; l < NDIM; l++) d += (a[l] > b[l]) ? longint'(a[l] - b[l]) : longint'(b[l] - a[l]);
    return d;
  endfunction

  function automatic int nearest(sample_t s);
    longint unsigned best = 64'hFFFF_FFFF_FFFF_FFFF;
    int bi = 0;
    for (int j = 0; j < NN; j++)
      if (l1(s, dut.u_som.weights[j]) < best) begin best = l1(s, dut.u_som.weights[j]); bi = j; end
    return bi;
  endfunction

  function automatic longint unsigned region(int a);
    return (a == 99) ? 64'h8040_0000 : 64'h8000_0000 + 64'h10000 * longint'(a);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sample_valid) begin
      if (collect) begin
        train_s.push_back(sample);
        train_l.push_back(last_algo);
        if (train_s.size() == 257) collect <= 0;
      end else if (trained && !training) begin
        pend_cyc.push_back(cyc + 5);
        pend_s.push_back(sample);
        pend_a.push_back(last_algo);
      end
    end
    if (rst_n && res_valid) begin
      sample_t s;
      int a, bi;
      n_res++;
      checks++;
      if (pend_cyc.size() == 0) begin
        failures++;
      end else begin
        longint unsigned ec;
        ec = pend_cyc.pop_front();
        s  = pend_s.pop_front();
        a  = pend_a.pop_front();
        bi = nearest(s);
        if (cyc != ec || int'(res_idx) != bi || longint'(res_dist) != l1(s, dut.u_som.weights[bi]) ||
            res_anomaly != (longint'(res_dist) > THRESH)) begin
          failures++;
          $display("result idx %0d/%0d at %0d/%0d", res_idx, bi, cyc, ec);
        end
        if (a == 99) begin
          inj++;
          if (res_anomaly) inj_flag++;
        end else begin
          norm++;
          if (res_anomaly) norm_flag++;
          else if (label[res_idx] == a) correct++;
        end
      end
    end
  end

  localparam logic [31:0] I_LW  = 32'h0004_a503;
  localparam logic [31:0] I_SW  = 32'h00a4_a023;
  localparam logic [31:0] I_JAL = 32'h0000_00ef;
  localparam logic [31:0] I_RET = 32'h0000_8082;
  localparam logic [31:0] I_ADD = 32'h00b5_0533;

  task automatic run_code(int a, int ncyc);
    int pm, pj;
    pm = (a == 99) ? 60 : 10 + 6 * a;
    pj = (a == 99) ? 2  : 3 + 2 * a;
    for (int c = 0; c < ncyc; c++) begin
      int r;
      @(negedge clk);
      trace_valid = ($urandom_range(0, 9) != 0);
      r = $urandom_range(0, 99);
      trace_pc = 32'(region(a) + 2 * $urandom_range(0, 511));
      if (r < pm)           trace_instr = (r % 2 == 0) ? I_LW : I_SW;
      else if (r < pm + pj) trace_instr = (r % 2 == 0) ? I_JAL : I_RET;
      else                  trace_instr = I_ADD;
    end
  endtask

  task automatic call(int a);
    int n;
    @(negedge clk);
    last_algo = cur_algo;
    cur_algo  = a;
    trace_valid = 1;
    trace_pc    = 32'h8000_f000;
    trace_instr = I_JAL;
    if (a == 99) n = $urandom_range(3000, 9000);
    else         n = $urandom_range(it_lo[a], it_hi[a]) * cyc_it[a];
    run_code(a, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // collection rounds of 1 to 4 kernels
    while (collect) begin
      int k;
      k = $urandom_range(1, 4);
      for (int i = 0; i < k && collect; i++) call($urandom_range(0, 6));
    end
    checks++;
    if (n_samples != 10'd257) begin
      failures++;
      $display("collected %0d samples", n_samples);
    end
    // train while idle
    @(negedge clk) trace_valid = 0;
    train_start = 1;
    @(negedge clk) train_start = 0;
    while (training) @(negedge clk);
    checks++;
    if (!trained || dut.u_som.iter != 11'd514 || n_train_cyc != NN + 9 * 514) begin
      failures++;
      $display("training: %0d iterations in %0d cycles", dut.u_som.iter, n_train_cyc);
    end
    // label neurons by majority vote of the training samples they win
    begin
      int votes[NN][7];
      foreach (votes[j, a]) votes[j][a] = 0;
      foreach (train_s[i]) if (train_l[i] >= 0 && train_l[i] < 7) votes[nearest(train_s[i])][train_l[i]]++;
      for (int j = 0; j < NN; j++) begin
        label[j] = -1;
        for (int a = 0, best = 0; a < 7; a++) if (votes[j][a] > best) begin best = votes[j][a]; label[j] = a; end
      end
    end
    // test: 70 kernel runs and 10 injected runs, then one more call to close the last run
    for (int k = 0; k < 80; k++) call((k % 8 == 7) ? 99 : $urandom_range(0, 6));
    call(0);
    @(negedge clk) trace_valid = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (inj == 0 || inj_flag != inj || norm == 0) begin
      failures++;
      $display("injected runs %0d flagged %0d", inj, inj_flag);
    end
    $display("kernel runs %0d: correct %0d, flagged %0d; injected runs %0d: flagged %0d",
             norm, correct, norm_flag, inj, inj_flag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
