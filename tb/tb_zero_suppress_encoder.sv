// tb_zero_suppress_encoder -- zero suppression. A 5-bit encoder must turn a
// 32-bit block with 1s at 6, 18, 19 and 25 into those four positions; the
// default 8-bit encoder gets random 256-bit blocks of several densities and
// must list exactly the set positions in increasing order, report their
// number and the size (N+1) + N*count, and take one clock per position.
module tb_zero_suppress_encoder;
  logic clk = 0, rst = 1;
  logic start_a, start_b;
  logic [31:0] blk_a;
  logic [255:0] blk_b;
  logic busy_a, busy_b, pv_a, pv_b, done_a, done_b;
  logic [4:0] pos_a;
  logic [7:0] pos_b;
  logic [5:0] cnt_a;
  logic [8:0] cnt_b;
  logic [31:0] bits_a, bits_b;
  int checks = 0, failures = 0;
  int got_a [$], got_b [$];

  zero_suppress_encoder #(.N(5)) dut_a (.clk, .rst, .start_i(start_a), .block_i(blk_a), .busy_o(busy_a),
    .pos_o(pos_a), .pos_valid_o(pv_a), .count_o(cnt_a), .bits_o(bits_a), .done_o(done_a));
  zero_suppress_encoder dut_b (.clk, .rst, .start_i(start_b), .block_i(blk_b), .busy_o(busy_b),
    .pos_o(pos_b), .pos_valid_o(pv_b), .count_o(cnt_b), .bits_o(bits_b), .done_o(done_b));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (pv_a) got_a.push_back(int'(pos_a));
    if (pv_b) got_b.push_back(int'(pos_b));
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dens [] = '{0, 1, 2, 5, 20, 50, 100};
    start_a = 0; start_b = 0; blk_a = '0; blk_b = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // the worked example
    got_a.delete();
    blk_a = (32'd1 << 6) | (32'd1 << 18) | (32'd1 << 19) | (32'd1 << 25);
    start_a = 1; @(posedge clk); #1; start_a = 0;
    while (!done_a) begin @(posedge clk); #1; end
    #1;
    checks++;
    if (got_a.size() != 4 || got_a[0] != 6 || got_a[1] != 18 || got_a[2] != 19 || got_a[3] != 25) begin
      failures++; $display("example positions wrong");
    end
    checks++;
    if (cnt_a != 6'd4 || bits_a != 32'(6 + 4*5)) begin failures++; $display("example count/size wrong"); end
    // random blocks
    foreach (dens[d]) for (int rep = 0; rep < 6; rep++) begin
      int expect_pos [$];
      int t;
      expect_pos.delete();
      for (int i = 0; i < 256; i++) begin
        blk_b[i] = ($urandom_range(0, 99) < dens[d]);
        if (blk_b[i]) expect_pos.push_back(i);
      end
      got_b.delete();
      start_b = 1; @(posedge clk); #1; start_b = 0;
      t = 0;
      while (!done_b) begin @(posedge clk); #1; t++; if (t > 400) break; end
      #1;
      checks++;
      if (got_b.size() != expect_pos.size()) begin
        failures++; $display("%0d positions, expected %0d", got_b.size(), expect_pos.size());
      end else foreach (got_b[k]) if (got_b[k] != expect_pos[k]) begin
        failures++; $display("position %0d wrong", k); break;
      end
      checks++;
      if (int'(cnt_b) != expect_pos.size() || int'(bits_b) != 9 + 8 * expect_pos.size()) begin
        failures++; $display("count/size wrong");
      end
      // one clock per position plus the closing clock
      checks++;
      if (t != expect_pos.size() + 1) begin failures++; $display("took %0d clocks for %0d positions", t, expect_pos.size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
