// tb_nirvana_top: end-to-end test of the anomaly detector at its default
// parameters (1024-cycle windows, 4 KiB range threshold, 14 neurons,
// 512-sample training buffer).
//
// A trace generator stands in for the monitored core. It runs a main loop
// that calls seven "algorithms", each a 1 KiB code region 64 KiB away from
// the others with its own mix of loads/stores and jumps, for a random number
// of cycles (the core retires an instruction in 90% of the cycles). A call
// is a long jump from the main loop; a run of "injected" code, far from all
// legitimate code, stands in for an attack.
//  1 collect: algorithm runs fill the training buffer past its 512 entries
//    (set_full must pulse); every sample must have its average PCs inside
//    the code region of the algorithm that just ran.
//  2 train: while the map trains, the trace keeps running, so samples are
//    dropped (infer_dropped); training must take 2 x 512 iterations of
//    9 cycles each after 14 initialisation cycles.
//  3 classify: normal runs and injected runs. Every result must come 5
//    cycles after its sample and equal a reference L1 nearest-neuron search
//    over the trained weights; every injected run must be flagged.
// Each mechanism (window kept, window discarded, sample, buffer full,
// training, dropped sample, classification, anomaly) is counted and must
// occur at least once.
module tb_nirvana_top;
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
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ counters
  int n_kept = 0, n_disc = 0, n_samp = 0, n_full = 0, n_drop = 0;
  int n_res = 0, n_anom = 0, n_trained = 0;
  int norm_res = 0, norm_anom = 0, inj_res = 0, inj_anom = 0;
  longint unsigned cyc = 0;
  int n_train_cyc = 0;
  always @(posedge clk) if (rst_n && training) n_train_cyc++;

  // the algorithm running now and the one before it (99 = injected code);
  // a sample describes the run that a call has just ended
  int cur_algo = -1, last_algo = -1;
  longint unsigned pend_cyc[$];
  sample_t pend_s[$];
  int pend_algo[$];

  function automatic longint unsigned l1(sample_t a, sample_t b);
    longint unsigned d = 0;
    for (int l = 0; l < NDIM; l++) d += (a[l] > b[l]) ? longint'(a[l] - b[l]) : longint'(b[l] - a[l]);
    return d;
  endfunction

  function automatic longint unsigned region(int a);
    return (a == 99) ? 64'h8040_0000 : 64'h8000_0000 + 64'h10000 * longint'(a);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (win_kept) n_kept++;
      if (win_discarded) n_disc++;
      if (set_full) n_full++;
      if (infer_dropped) n_drop++;
      if (sample_valid) begin
        n_samp++;
        // average PCs lie inside the code that ran last
        checks++;
        if (last_algo < 0 ||
            longint'(sample[0]) < region(last_algo) || longint'(sample[0]) >= region(last_algo) + 1024 ||
            longint'(sample[2]) < region(last_algo) || longint'(sample[2]) >= region(last_algo) + 1024) begin
          failures++;
          if (failures < 10) $display("sample %h %h after algorithm %0d", sample[0], sample[2], last_algo);
        end
        if (!collect && trained && !training) begin
          pend_cyc.push_back(cyc + 5);
          pend_s.push_back(sample);
          pend_algo.push_back(last_algo);
        end
      end
      if (res_valid) begin
        sample_t s;
        longint unsigned ec, best;
        int bi, a;
        n_res++;
        if (res_anomaly) n_anom++;
        checks++;
        if (pend_cyc.size() == 0) begin
          failures++;
          $display("result without a sample");
        end else begin
          ec = pend_cyc.pop_front();
          s  = pend_s.pop_front();
          a  = pend_algo.pop_front();
          best = 64'hFFFF_FFFF_FFFF_FFFF;
          bi = 0;
          for (int j = 0; j < NN; j++)
            if (l1(s, dut.u_som.weights[j]) < best) begin best = l1(s, dut.u_som.weights[j]); bi = j; end
          if (cyc != ec || int'(res_idx) != bi || longint'(res_dist) != best ||
              res_anomaly != (best > THRESH)) begin
            failures++;
            $display("result idx %0d/%0d dist %0d/%0d at %0d/%0d", res_idx, bi, res_dist, best, cyc, ec);
          end
          if (a == 99) begin
            inj_res++;
            if (res_anomaly) inj_anom++;
          end else begin
            norm_res++;
            if (res_anomaly) norm_anom++;
          end
        end
      end
    end
  end

  // ------------------------------------------------------- trace generator
  localparam logic [31:0] I_LW   = 32'h0004_a503;  // lw a0,0(s1)
  localparam logic [31:0] I_SW   = 32'h00a4_a023;  // sw a0,0(s1)
  localparam logic [31:0] I_JAL  = 32'h0000_00ef;  // jal ra,.
  localparam logic [31:0] I_RET  = 32'h0000_8082;  // c.jr ra
  localparam logic [31:0] I_ADD  = 32'h00b5_0533;  // add a0,a0,a1
  localparam logic [31:0] I_BEQ  = 32'h00b5_0463;  // beq a0,a1,.

  task automatic run_code(int a, int ncyc);
    longint unsigned base;
    int pm, pj;
    base = region(a);
    pm = (a == 99) ? 60 : 10 + 6 * a;   // % of load/stores
    pj = (a == 99) ? 2  : 3 + 2 * a;    // % of jumps
    for (int c = 0; c < ncyc; c++) begin
      int r;
      @(negedge clk);
      trace_valid = ($urandom_range(0, 9) != 0);
      r = $urandom_range(0, 99);
      trace_pc = 32'(base + 2 * $urandom_range(0, 511));
      if (r < pm)           trace_instr = (r % 2 == 0) ? I_LW : I_SW;
      else if (r < pm + pj) trace_instr = (r % 2 == 0) ? I_JAL : I_RET;
      else if (r < 90)      trace_instr = I_ADD;
      else                  trace_instr = I_BEQ;
    end
  endtask

  // main loop: a few instructions, then a call into the next algorithm
  task automatic call(int a, int ncyc);
    @(negedge clk);
    last_algo = cur_algo;
    cur_algo  = a;
    trace_valid = 1;
    trace_pc    = 32'h8000_f000;
    trace_instr = I_JAL;
    run_code(a, ncyc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. collect
    collect = 1;
    while (n_full == 0) call($urandom_range(0, 6), $urandom_range(2200, 6000));
    checks++;
    if (n_samples != 10'd512) failures++;

    // 2. train while the program keeps running
    collect = 0;
    call($urandom_range(0, 6), 2000);
    @(negedge clk) train_start = 1;
    @(negedge clk) train_start = 0;
    while (training) call($urandom_range(0, 6), $urandom_range(2200, 6000));
    n_trained = trained ? 1 : 0;
    checks++;
    if (!trained || dut.u_som.iter != 11'd1024 || n_train_cyc != NN + 9 * 1024) begin
      failures++;
      $display("training: trained %0d iterations %0d cycles %0d", trained, dut.u_som.iter, n_train_cyc);
    end

    // 3. classify normal and injected runs
    for (int k = 0; k < 60; k++) begin
      if (k % 4 == 3) call(99, $urandom_range(2200, 6000));
      else            call($urandom_range(0, 6), $urandom_range(2200, 6000));
    end
    call(0, 3000);
    @(negedge clk) trace_valid = 0;
    repeat (100) @(negedge clk);

    checks++;
    if (inj_res == 0 || inj_anom != inj_res) begin
      failures++;
      $display("injected runs: %0d classified, %0d flagged", inj_res, inj_anom);
    end
    checks++;
    if (n_kept == 0 || n_disc == 0 || n_samp == 0 || n_full == 0 || n_drop == 0 ||
        n_trained == 0 || n_res == 0 || n_anom == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("windows kept %0d discarded %0d, samples %0d, buffer full %0d, dropped %0d",
             n_kept, n_disc, n_samp, n_full, n_drop);
    $display("classified %0d: normal %0d (flagged %0d), injected %0d (flagged %0d)",
             n_res, norm_res, norm_anom, inj_res, inj_anom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
