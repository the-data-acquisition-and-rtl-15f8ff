// tb_mainsum_card -- main-sum card: random pairs of 15 x 10-bit pre-sum
// histograms (up to the largest possible value, 8 x 127) must give their
// bin-wise 11-bit sum one clock later; valid_o follows valid_i.
module tb_mainsum_card;
  import cip_pkg::*;
  logic clk = 0, rst = 1, vin = 0, vout;
  logic [BINS*W_PRESUM-1:0] h0, h1;
  logic [BINS*W_MAIN-1:0] hout;
  int checks = 0, failures = 0;

  mainsum_card dut (.clk, .rst, .valid_i(vin), .hist0_i(h0), .hist1_i(h1), .hist_o(hout), .valid_o(vout));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h0 = '0; h1 = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 300; t++) begin
      int a [15], b [15];
      for (int k = 0; k < 15; k++) begin
        a[k] = (t == 0) ? 1016 : $urandom_range(0, 1016);
        b[k] = (t == 0) ? 1016 : $urandom_range(0, 1016);
        h0[10*k +: 10] = 10'(a[k]);
        h1[10*k +: 10] = 10'(b[k]);
      end
      vin = (t % 3 != 2);
      @(posedge clk); #1;
      checks++;
      if (vout != vin) failures++;
      if (vin)
        for (int k = 0; k < 15; k++) begin
          checks++;
          if (int'(hout[11*k +: 11]) != a[k] + b[k]) begin
            failures++; $display("bin %0d: %0d expected %0d", k, hout[11*k +: 11], a[k] + b[k]);
          end
        end
      vin = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
