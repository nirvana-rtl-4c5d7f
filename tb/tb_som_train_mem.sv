// tb_som_train_mem: self-checking test of the training-sample buffer.
// Fills all 512 entries with random samples, then reads random addresses
// (while writing others) and checks each read one cycle later against a
// reference copy kept in the bench.
module tb_som_train_mem;
  import nirvana_pkg::*;

  localparam int DEPTH = 512;
  logic clk = 0;
  logic we = 0;
  logic [8:0] waddr = '0, raddr = '0;
  sample_t wdata = '0, rdata;
  sample_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  som_train_mem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a);
      for (int l = 0; l < NDIM; l++) wdata[l] = $urandom;
      ref_mem[a] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      sample_t exp_d;
      @(negedge clk);
      raddr = 9'($urandom_range(0, DEPTH - 1));
      we    = $urandom_range(0, 1) == 1;
      waddr = 9'($urandom_range(0, DEPTH - 1));
      if (waddr == raddr) we = 0;
      for (int l = 0; l < NDIM; l++) wdata[l] = $urandom;
      exp_d = ref_mem[raddr];
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata != exp_d) begin
        failures++;
        if (failures < 10) $display("addr %0d: read %h expected %h", raddr, rdata, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
