// tb_som_classifier: self-checking test of the SOM classifier at its default
// size (14 neurons, 512-sample buffer).
//  1. Overfills the training buffer (set_full must pulse for every extra
//     sample), then clears it.
//  2. Collects 70 samples from seven well-separated clusters (stand-ins for
//     seven known programs) and trains. Every training iteration is checked:
//     the new weights must equal the update rule applied to the old weights
//     for one of the stored samples (nearest neuron by L1, winner-row
//     distances, mu0 staircase, mu1 by distance), and the iteration count
//     must be twice the number of samples, each taking 9 cycles after 14
//     initialisation cycles. Samples offered during training must pulse
//     infer_dropped.
//  3. Classifies cluster centres and far-away points: the result must match a
//     reference L1 argmin over the trained weights, arrive 5 cycles after the
//     sample, and flag exactly the points whose nearest-neuron distance
//     exceeds the threshold (far-away points always do). Training must also
//     lower the mean distance from the stored samples to their nearest
//     neuron, and bring neurons close to at least three of the clusters (the
//     short schedule of two passes does not always reach all seven).
module tb_som_classifier;
  import nirvana_pkg::*;

  localparam int NN = 14, R = 1024;
  localparam longint unsigned THRESH = 4000;
  logic clk = 0, rst_n = 0;
  logic sample_valid = 0, collect = 0, clear_set = 0, train_start = 0;
  sample_t sample = '0;
  logic [33:0] anomaly_thresh = 34'(THRESH);
  logic training, trained, res_valid, res_anomaly, set_full, infer_dropped;
  logic [9:0] n_samples;
  logic [10:0] iter;
  logic [3:0] res_idx;
  logic [33:0] res_dist;
  sample_t [NN-1:0] weights;
  int checks = 0, failures = 0;

  som_classifier dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t stored[$];
  sample_t centre[7];
  longint unsigned cyc = 0;
  int n_full = 0, n_drop = 0, upd_checked = 0, upd_bad = 0, n_train_cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && set_full) n_full++;
    if (rst_n && infer_dropped) n_drop++;
    if (rst_n && training) n_train_cyc++;
  end

  function automatic longint unsigned l1(sample_t a, sample_t b);
    longint unsigned d = 0;
    for (int l = 0; l < NDIM; l++) d += (a[l] > b[l]) ? longint'(a[l] - b[l]) : longint'(b[l] - a[l]);
    return d;
  endfunction

  function automatic int nearest(sample_t k, sample_t [NN-1:0] w);
    longint unsigned best = 64'hFFFF_FFFF_FFFF_FFFF;
    int bi = 0;
    for (int j = 0; j < NN; j++) if (l1(k, w[j]) < best) begin best = l1(k, w[j]); bi = j; end
    return bi;
  endfunction

  // weights after one training step with sample k
  function automatic sample_t [NN-1:0] stepped(sample_t [NN-1:0] w, sample_t k, int it, int total);
    sample_t [NN-1:0] nw;
    int win, s, sh;
    longint mu0;
    longint unsigned m;
    win = nearest(k, w);
    s = (8 * it) / total;
    if (s > 7) s = 7;
    mu0 = longint'($floor(128.0 * real'(7 - s) / 7.0 + 0.5));
    for (int j = 0; j < NN; j++) begin
      m  = l1(w[win], w[j]);
      sh = (m < R) ? 0 : (m < 2 * R) ? 1 : (m < 4 * R) ? 2 : 3;
      for (int l = 0; l < NDIM; l++) begin
        longint diff, st;
        diff = longint'(k[l]) - longint'(w[j][l]);
        st   = (sh == 3) ? 0 : (((diff * mu0) >>> 8) >>> sh);
        nw[j][l] = 32'(longint'(w[j][l]) + st);
      end
    end
    return nw;
  endfunction

  // quantization error of the initial weights (first training iteration)
  longint unsigned qe_init = 0;
  always @(negedge clk) begin
    if (rst_n && training && dut.state_q == dut.S_PICK && iter == 0 && qe_init == 0)
      foreach (stored[i]) qe_init += l1(stored[i], weights[nearest(stored[i], weights)]);
  end

  // training-step monitor
  sample_t [NN-1:0] prev_w;
  int prev_iter = -1;
  always @(negedge clk) begin
    if (rst_n) begin
      if (prev_iter >= 0 && int'(iter) == prev_iter + 1) begin
        bit ok = 0;
        foreach (stored[i]) if (stepped(prev_w, stored[i], prev_iter, 2 * stored.size()) == weights) ok = 1;
        upd_checked++;
        if (!ok) begin
          upd_bad++;
          if (upd_bad < 5) $display("iteration %0d: weights match no training sample", prev_iter);
        end
      end
      prev_w    = weights;
      prev_iter = int'(iter);
    end
  end

  task automatic send(sample_t s);
    @(negedge clk);
    sample_valid = 1;
    sample = s;
    @(negedge clk);
    sample_valid = 0;
  endtask

  task automatic classify(sample_t s, int exp_anom);
    longint unsigned t0, ed;
    int ei;
    ei = nearest(s, weights);
    ed = l1(s, weights[ei]);
    if (exp_anom < 0) exp_anom = (ed > THRESH) ? 1 : 0;
    @(negedge clk);
    sample_valid = 1;
    sample = s;
    t0 = cyc;
    @(negedge clk);
    sample_valid = 0;
    while (!res_valid && cyc < t0 + 20) @(negedge clk);
    checks++;
    if (!res_valid || cyc != t0 + 5 || int'(res_idx) != ei || longint'(res_dist) != ed ||
        res_anomaly != 1'(exp_anom)) begin
      failures++;
      $display("classify: valid %0d after %0d cycles idx %0d/%0d dist %0d/%0d anomaly %0d/%0d",
               res_valid, cyc - t0, res_idx, ei, res_dist, ed, res_anomaly, exp_anom);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. overfill and clear
    collect = 1;
    for (int i = 0; i < 520; i++) begin
      sample_t s;
      for (int l = 0; l < NDIM; l++) s[l] = $urandom;
      send(s);
    end
    repeat (2) @(negedge clk);
    checks++;
    if (n_samples != 10'd512 || n_full != 8) begin
      failures++;
      $display("buffer: n_samples %0d set_full pulses %0d", n_samples, n_full);
    end
    clear_set = 1;
    @(negedge clk);
    clear_set = 0;
    checks++;
    if (n_samples != 0) failures++;

    // 2. seven clusters
    for (int k = 0; k < 7; k++) begin
      centre[k][0] = 32'h8000_0000 + 32'(k) * 32'h4000;
      centre[k][1] = 32'(100 + 5 * k);
      centre[k][2] = 32'h8000_2000 + 32'(k) * 32'h4000;
      centre[k][3] = 32'(200 + 40 * k);
    end
    for (int i = 0; i < 70; i++) begin
      sample_t s;
      int k;
      k = i % 7;
      for (int l = 0; l < NDIM; l++) s[l] = centre[k][l] + 32'($urandom_range(0, 128)) - 32'd64;
      stored.push_back(s);
      send(s);
    end
    checks++;
    if (n_samples != 10'd70) failures++;
    collect = 0;
    @(negedge clk);
    train_start = 1;
    @(negedge clk);
    train_start = 0;
    // a sample during training is not classified
    repeat (20) @(negedge clk);
    send(stored[0]);
    while (training) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (!trained || int'(iter) != 140 || upd_checked != 140 || upd_bad != 0 || n_drop != 1) begin
      failures++;
      $display("training: trained %0d iterations %0d checked %0d bad %0d dropped %0d",
               trained, iter, upd_checked, upd_bad, n_drop);
    end
    // 14 initialisation cycles, then 9 cycles per iteration
    checks++;
    if (n_train_cyc != NN + 9 * 140) begin
      failures++;
      $display("training took %0d cycles, expected %0d", n_train_cyc, NN + 9 * 140);
    end

    // 3. inference
    begin
      int covered = 0;
      longint unsigned qe_after = 0;
      foreach (stored[i]) qe_after += l1(stored[i], weights[nearest(stored[i], weights)]);
      for (int k = 0; k < 7; k++)
        if (l1(centre[k], weights[nearest(centre[k], weights)]) < THRESH / 2) covered++;
      checks++;
      if (covered < 3 || qe_after >= qe_init) begin
        failures++;
        $display("training quality: %0d clusters covered, error %0d -> %0d", covered, qe_init, qe_after);
      end
      $display("clusters covered %0d of 7, mean error %0d -> %0d", covered,
               qe_init / 70, qe_after / 70);
    end
    for (int k = 0; k < 7; k++) begin
      classify(centre[k], -1);
      classify(stored[k + 14], -1);
      begin
        sample_t far;
        far = centre[k];
        far[0] = far[0] + 32'h0010_0000;
        classify(far, 1);
        far = centre[k];
        far[3] = far[3] + 32'd5000;
        classify(far, 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
