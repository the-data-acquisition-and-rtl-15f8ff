// tb_presum_card -- pre-sum card with eight histogram links. Each link
// carries a random sector histogram (15 x 7 bits, four 32-bit words per
// bunch crossing, including the extreme values 0 and 127). The card's
// 15 x 10-bit output must be the bin-wise sum of the eight histograms of the
// previous crossing, with valid_o high in the first clock after the
// receivers have taken the last word (seen at the second edge after it).
module tb_presum_card;
  import cip_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] phase;
  logic [7:0][31:0] link;
  logic [BINS*W_PRESUM-1:0] hout;
  logic vout;
  logic [127:0] frames [8];
  int sums [$];   // expected bin sums, 15 per crossing
  int checks = 0, failures = 0, cyc = 0, last_end = 0, nsum = 0;

  presum_card dut (.clk, .rst, .phase_i(phase), .link_i(link), .hist_o(hout), .valid_o(vout));
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) phase <= 2'd0;
    else     phase <= phase + 2'd1;
  end

  always_comb
    for (int i = 0; i < 8; i++) link[i] = frames[i][32*phase +: 32];

  always @(posedge clk) begin
    cyc++;
    if (!rst && phase == 2'd3) begin
      int mode;
      for (int b = 0; b < 15; b++) begin
        int s;
        s = 0;
        for (int i = 0; i < 8; i++) s += int'(frames[i][7*b +: 7]);
        sums.push_back(s);
      end
      last_end = cyc;
      mode = $urandom_range(0, 9);
      for (int i = 0; i < 8; i++) begin
        logic [127:0] f;
        f = '0;
        for (int b = 0; b < 15; b++)
          f[7*b +: 7] = (mode == 0) ? 7'd127 : (mode == 1) ? 7'd0 : 7'($urandom);
        frames[i] <= f;
      end
    end
    if (!rst && vout) begin
      checks++;
      if (cyc - last_end != 2) begin failures++; $display("valid at wrong time"); end
      begin
        for (int b = 0; b < 15; b++) begin
          int e;
          e = sums.pop_front();
          checks++;
          if (int'(hout[10*b +: 10]) != e) begin
            failures++;
            if (failures < 10) $display("bin %0d: %0d expected %0d", b, hout[10*b +: 10], e);
          end
        end
        nsum++;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) frames[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (4 * 200) @(posedge clk);
    checks++;
    if (nsum < 190) begin failures++; $display("only %0d sums", nsum); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
