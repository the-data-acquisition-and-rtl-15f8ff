// tb_track_finder -- known tracks (a straight one and the two most inclined
// ones) must set exactly their own bin for their central pad; random
// patterns are compared with a reference model of the track patterns
// (offset of layer l for bin b = ((l-2)*(b-7))/2, all five layers hit).
module tb_track_finder;
  import cip_pkg::*;
  logic clk = 0, rst = 1, vin = 0, v0, v1;
  logic [LAYERS*PADS-1:0] pat;
  logic [BINS*HALF_PADS-1:0] h0, h1;
  int checks = 0, failures = 0;

  track_finder #(.HALF(0)) dut0 (.clk, .rst, .valid_i(vin), .pattern_i(pat), .hits_o(h0), .valid_o(v0));
  track_finder #(.HALF(1)) dut1 (.clk, .rst, .valid_i(vin), .pattern_i(pat), .hits_o(h1), .valid_o(v1));
  always #5 clk = ~clk;

  function automatic bit ref_hit(input logic [LAYERS*PADS-1:0] p, input int c, input int b);
    for (int l = 0; l < 5; l++) begin
      int q;
      q = c + ((l - 2) * (b - 7)) / 2;
      if (q < 0 || q > 119) return 0;
      if (!p[120*l + q]) return 0;
    end
    return 1;
  endfunction

  task automatic compare(input string what);
    @(posedge clk); #1;
    checks++;
    if (!v0 || !v1) failures++;
    for (int b = 0; b < 15; b++)
      for (int c = 0; c < 120; c++) begin
        bit got, exp;
        got = (c < 60) ? h0[60*b + c] : h1[60*b + c - 60];
        exp = ref_hit(pat, c, b);
        checks++;
        if (got !== exp) begin
          failures++;
          if (failures < 10) $display("%s: pad %0d bin %0d got %0d exp %0d", what, c, b, got, exp);
        end
      end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pat = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // straight track through pad 30: only bin 7 of pad 30
    pat = '0;
    for (int l = 0; l < 5; l++) pat[120*l + 30] = 1;
    vin = 1; @(posedge clk); #1; vin = 0; @(posedge clk); #1;
    checks++;
    if (h0 != (BINS*HALF_PADS)'(1) << (60*7 + 30)) begin failures++; $display("straight track wrong"); end
    // bin 0 track at central pad 80: layers at 87, 83, 80, 77, 73
    pat = '0;
    pat[120*0 + 87] = 1; pat[120*1 + 83] = 1; pat[120*2 + 80] = 1; pat[120*3 + 77] = 1; pat[120*4 + 73] = 1;
    vin = 1; @(posedge clk); #1; vin = 0; @(posedge clk); #1;
    checks++;
    if (h1 != (BINS*HALF_PADS)'(1) << (60*0 + 20) || h0 != 0) begin failures++; $display("bin 0 track wrong"); end
    // bin 14 track at central pad 59 (boundary): 52, 56, 59, 62, 66
    pat = '0;
    pat[120*0 + 52] = 1; pat[120*1 + 56] = 1; pat[120*2 + 59] = 1; pat[120*3 + 62] = 1; pat[120*4 + 66] = 1;
    vin = 1; @(posedge clk); #1; vin = 0; @(posedge clk); #1;
    checks++;
    if (h0 != (BINS*HALF_PADS)'(1) << (60*14 + 59) || h1 != 0) begin failures++; $display("bin 14 track wrong"); end
    // a track with one layer missing is not found
    pat[120*3 + 62] = 0;
    vin = 1; @(posedge clk); #1; vin = 0; @(posedge clk); #1;
    checks++;
    if (h0 != 0) begin failures++; $display("4-layer coincidence accepted"); end
    // random patterns of rising density
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 600; i++) pat[i] = ($urandom_range(0, 99) < 10 + t * 2);
      vin = 1;
      compare("random");
      vin = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
