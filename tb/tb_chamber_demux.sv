// tb_chamber_demux -- checks the four-times demultiplexing of the 150 chamber
// lines against an independently computed pad map: pad p of layer l is
// carried by chip 2l + p/60, line (p mod 60)/4, in phase p mod 4.
module tb_chamber_demux;
  import cip_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] phase = 0;
  logic [LINES-1:0] line;
  logic [LAYERS*PADS-1:0] pattern;
  logic valid;
  int checks = 0, failures = 0;
  logic [LINES-1:0] smp [4];

  chamber_demux dut (.clk, .rst, .phase_i(phase), .line_i(line), .pattern_o(pattern), .valid_o(valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int bcn = 0; bcn < 50; bcn++) begin
      for (int k = 0; k < 4; k++) begin
        for (int i = 0; i < int'(LINES); i++) smp[k][i] = 1'($urandom);
        phase = 2'(k);
        line  = smp[k];
        @(posedge clk); #1;
      end
      checks++;
      if (!valid) begin failures++; $display("valid missing at bc %0d", bcn); end
      for (int l = 0; l < 5; l++)
        for (int p = 0; p < 120; p++) begin
          int chip, j, k;
          chip = 2*l + p/60; j = (p % 60) / 4; k = p % 4;
          checks++;
          if (pattern[120*l + p] !== smp[k][15*chip + j]) begin
            failures++;
            if (failures < 10) $display("bc %0d layer %0d pad %0d wrong", bcn, l, p);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
