// tb_som_lr_lut: self-checking test of the learning-rate tables.
// mu0 is checked over whole training runs of several lengths against
// 0.5*(7-s)/7 in Q0.8 with s = min(7, floor(8*iter/total)); mu1 is checked
// for random and boundary distances against 1, 1/2, 1/4, 0 at R, 2R, 4R.
module tb_som_lr_lut;
  import nirvana_pkg::*;

  localparam int NN = 14, ITER_W = 11, R = 1024;
  logic [ITER_W-1:0] iter, total;
  logic [NN-1:0][33:0] ndist;
  logic [7:0] mu0;
  logic [NN-1:0][1:0] mu1_shift;
  int checks = 0, failures = 0;

  som_lr_lut #(.NN(NN), .ITER_W(ITER_W), .NEIGH_R(R)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int totals[4] = '{400, 14, 1000, 2};
    ndist = '0;
    foreach (totals[t]) begin
      total = ITER_W'(totals[t]);
      for (int i = 0; i < totals[t]; i++) begin
        int s;
        int e;
        iter = ITER_W'(i);
        #1;
        s = (8 * i) / totals[t];
        if (s > 7) s = 7;
        e = int'($floor(128.0 * real'(7 - s) / 7.0 + 0.5));
        checks++;
        if (int'(mu0) != e) begin
          failures++;
          if (failures < 10) $display("iter %0d/%0d: mu0 %0d expected %0d", i, totals[t], mu0, e);
        end
      end
    end
    for (int n = 0; n < 400; n++) begin
      int d[NN];
      for (int j = 0; j < NN; j++) begin
        case ($urandom_range(0, 2))
          0: d[j] = $urandom_range(0, 5 * R);
          1: d[j] = R * (1 << $urandom_range(0, 2)) - $urandom_range(0, 1);
          default: d[j] = (n < 200) ? 0 : 1_000_000;
        endcase
        ndist[j] = 34'(d[j]);
      end
      #1;
      for (int j = 0; j < NN; j++) begin
        int e;
        e = (d[j] < R) ? 0 : (d[j] < 2 * R) ? 1 : (d[j] < 4 * R) ? 2 : 3;
        checks++;
        if (int'(mu1_shift[j]) != e) begin
          failures++;
          if (failures < 10) $display("dist %0d: mu1 code %0d expected %0d", d[j], mu1_shift[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
