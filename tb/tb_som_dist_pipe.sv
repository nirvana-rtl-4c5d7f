// tb_som_dist_pipe: self-checking test of the pipelined nearest-neuron search.
// Loads random weights (some rounds from a narrow range so that ties occur),
// streams one random input per cycle (with gaps) and checks every output
// against a reference L1 argmin (lowest index wins a tie) and that it comes
// exactly 5 cycles after its input.
module tb_som_dist_pipe;
  import nirvana_pkg::*;

  localparam int NN = 14;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_tag = 0;
  sample_t in_sample = '0;
  sample_t [NN-1:0] weights = '0;
  logic out_valid, out_tag, busy;
  logic [3:0] out_idx;
  logic [33:0] out_dist;
  int checks = 0, failures = 0;

  som_dist_pipe #(.NN(NN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint unsigned d; int idx; longint unsigned cyc; bit tag; } exp_t;
  exp_t q[$];
  longint unsigned cyc = 0;
  int ties = 0;

  function automatic exp_t reference(sample_t k);
    exp_t e;
    e.d = 64'hFFFF_FFFF_FFFF;
    e.idx  = 0;
    for (int j = 0; j < NN; j++) begin
      longint unsigned dd = 0;
      for (int l = 0; l < NDIM; l++)
        dd += (k[l] > weights[j][l]) ? longint'(k[l] - weights[j][l]) : longint'(weights[j][l] - k[l]);
      if (dd == e.d) ties++;
      if (dd < e.d) begin e.d = dd; e.idx = j; end
    end
    return e;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("output with no input at %0d", cyc);
      end else begin
        e = q.pop_front();
        if (out_idx != 4'(e.idx) || out_dist != 34'(e.d) || cyc != e.cyc || out_tag != e.tag) begin
          failures++;
          if (failures < 10) $display("got idx %0d dist %0d at %0d, expected %0d %0d at %0d",
                                      out_idx, out_dist, cyc, e.idx, e.d, e.cyc);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      bit narrow;
      narrow = (round % 2 == 1);
      in_valid = 0;
      repeat (6) @(negedge clk);       // drain before changing weights
      for (int j = 0; j < NN; j++)
        for (int l = 0; l < NDIM; l++)
          weights[j][l] = narrow ? 32'($urandom_range(0, 3)) : $urandom;
      for (int n = 0; n < 50; n++) begin
        exp_t e;
        in_valid = ($urandom_range(0, 3) != 0);
        in_tag   = $urandom_range(0, 1) == 1;
        for (int l = 0; l < NDIM; l++) in_sample[l] = narrow ? 32'($urandom_range(0, 3)) : $urandom;
        if (in_valid) begin
          e = reference(in_sample);
          e.cyc = cyc + 5;
          e.tag = in_tag;
          q.push_back(e);
        end
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0 || ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
