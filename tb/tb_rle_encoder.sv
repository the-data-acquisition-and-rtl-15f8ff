// tb_rle_encoder -- run length encoder. Two encoders see the same bit
// stream: one with 4-bit 0-runs and 2-bit 1-runs, which must turn the
// worked example 000000 1 00000000000 11 00000 1 000000 into
// 0110 01 1011 10 0101 01 0110, and one at the default widths (6, 2).
// For random patterns of several densities the code streams of both are
// decoded again and must give back the input bits, with the encoded size
// equal to the sum of the field widths.
module tb_rle_encoder;
  logic clk = 0, rst = 1;
  logic start, valid, bitv, last;
  logic rdy_a, rdy_b;
  logic [5:0] code_a, code_b;
  logic one_a, one_b, cv_a, cv_b, done_a, done_b;
  logic [31:0] bits_a, bits_b;
  int checks = 0, failures = 0;
  int codes_a [$], codes_b [$];
  bit  ones_a [$], ones_b [$];
  bit  stream [$];

  rle_encoder #(.W0(4), .W1(2)) dut_a (.clk, .rst, .start_i(start), .valid_i(valid), .bit_i(bitv),
    .last_i(last), .ready_o(rdy_a), .code_o(code_a[3:0]), .code_one_o(one_a),
    .code_valid_o(cv_a), .bits_o(bits_a), .done_o(done_a));
  rle_encoder dut_b (.clk, .rst, .start_i(start), .valid_i(valid), .bit_i(bitv),
    .last_i(last), .ready_o(rdy_b), .code_o(code_b), .code_one_o(one_b),
    .code_valid_o(cv_b), .bits_o(bits_b), .done_o(done_b));
  assign code_a[5:4] = 2'b00;
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (cv_a) begin codes_a.push_back(int'(code_a)); ones_a.push_back(one_a); end
    if (cv_b) begin codes_b.push_back(int'(code_b)); ones_b.push_back(one_b); end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // feed the stream; a bit is offered only when both encoders are ready
  task automatic encode();
    int i, n;
    codes_a.delete(); codes_b.delete(); ones_a.delete(); ones_b.delete();
    start = 1; @(posedge clk); #1; start = 0;
    i = 0;
    while (i < stream.size()) begin
      if (rdy_a && rdy_b) begin
        valid = 1; bitv = stream[i]; last = (i == stream.size() - 1);
        i++;
      end else begin
        valid = 0;
      end
      @(posedge clk); #1;
    end
    valid = 0; last = 0;
    n = 0;
    while (!(done_a || done_b) || n < 3) begin @(posedge clk); #1; n++; if (n > 20) break; end
    repeat (3) @(posedge clk);
    #1;
  endtask

  // decode a code stream and compare it with the input
  task automatic check_decode(input string name, input int codes[$], input bit ones[$],
                              input int w0, input int w1, input int bits);
    bit out [$];
    int size, expect_one;
    size = 0;
    expect_one = 0;
    foreach (codes[k]) begin
      checks++;
      if (int'(ones[k]) != expect_one) begin failures++; $display("%s: runs do not alternate", name); end
      for (int r = 0; r < codes[k]; r++) out.push_back(ones[k]);
      size += ones[k] ? w1 : w0;
      expect_one = 1 - expect_one;
    end
    checks++;
    if (out.size() != stream.size()) begin
      failures++; $display("%s: decoded %0d bits of %0d", name, out.size(), stream.size());
    end else begin
      foreach (out[k]) if (out[k] != stream[k]) begin
        failures++; $display("%s: decoded bit %0d wrong", name, k); break;
      end
    end
    checks++;
    if (size != bits) begin failures++; $display("%s: size %0d, reported %0d", name, size, bits); end
  endtask

  initial begin
    int ex [] = '{6, 1, 11, 2, 5, 1, 6};
    int dens [] = '{0, 1, 3, 10, 30, 60, 95, 100};
    start = 0; valid = 0; bitv = 0; last = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // the worked example
    stream.delete();
    foreach (ex[k]) for (int r = 0; r < ex[k]; r++) stream.push_back(k % 2);
    encode();
    checks++;
    if (codes_a.size() != 7) begin failures++; $display("example: %0d codes", codes_a.size()); end
    else foreach (ex[k]) begin
      checks++;
      if (codes_a[k] != ex[k] || ones_a[k] != (k % 2)) begin failures++; $display("example code %0d wrong", k); end
    end
    checks++;
    if (bits_a != 32'(4*4 + 3*2)) begin failures++; $display("example size %0d", bits_a); end
    check_decode("example (6,2)", codes_b, ones_b, 6, 2, int'(bits_b));
    // random patterns, 600 bits like one sector event
    foreach (dens[d]) for (int rep = 0; rep < 4; rep++) begin
      stream.delete();
      for (int k = 0; k < 600; k++) stream.push_back($urandom_range(0, 99) < dens[d]);
      encode();
      check_decode("(4,2)", codes_a, ones_a, 4, 2, int'(bits_a));
      check_decode("(6,2)", codes_b, ones_b, 6, 2, int'(bits_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
