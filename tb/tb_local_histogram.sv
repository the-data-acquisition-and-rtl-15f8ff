// tb_local_histogram -- random hit lists; every bin must equal the number of
// central pads with that bin's bit set, one cycle after valid_i.
module tb_local_histogram;
  import cip_pkg::*;
  logic clk = 0, rst = 1, vin = 0, vout;
  logic [BINS*HALF_PADS-1:0] hits;
  logic [BINS*W_FPGA-1:0] hist;
  int checks = 0, failures = 0;

  local_histogram dut (.clk, .rst, .valid_i(vin), .hits_i(hits), .hist_o(hist), .valid_o(vout));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hits = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      int dens;
      dens = (t < 2) ? (t == 0 ? 0 : 100) : int'($urandom_range(0, 100));
      for (int i = 0; i < int'(BINS*HALF_PADS); i++) hits[i] = ($urandom_range(0, 99) < dens);
      vin = 1;
      @(posedge clk); #1;
      vin = 0;
      checks++;
      if (!vout) failures++;
      for (int b = 0; b < int'(BINS); b++) begin
        int n;
        n = 0;
        for (int p = 0; p < int'(HALF_PADS); p++) n += hits[HALF_PADS*b + p];
        checks++;
        if (int'(hist[W_FPGA*b +: W_FPGA]) != n) begin
          failures++;
          if (failures < 10) $display("t %0d bin %0d: %0d expected %0d", t, b, hist[W_FPGA*b +: W_FPGA], n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
