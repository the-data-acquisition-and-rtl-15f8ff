// tb_stc_slow_card -- STC Slow Card with its default routing (CTC channels
// 0..7 to the encoder on IRQ3, the L2 Keep flip-flop to the encoder on
// IRQ4). Checks: a CTC request sets its flip-flop and raises IRQ3; the
// acknowledge for level 3 returns {vector base, highest pending channel} and
// releases that channel only; masked channels raise nothing; register set
// and clear; the L2 Keep flip-flop on IRQ4 is not released by the
// acknowledge; no vector for an acknowledge of an idle level; the gated
// L1/L2 Keep scalers count rising edges only while the gate is open and
// clear on reset; the information bits reach register and LEDs.
module tb_stc_slow_card;
  logic clk = 0, rst = 1;
  logic [7:0] irq_in;
  logic l2ff, l1kp, l2kp, gate, screset;
  logic [3:0] info, led;
  logic [7:1] irq;
  logic iack;
  logic [2:0] iack_lvl;
  logic [7:0] vec;
  logic vvalid;
  logic we;
  logic [2:0] addr;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;

  stc_slow_card dut (.clk, .rst, .ctc_irq_i(irq_in), .l2kp_ff_i(l2ff), .l1kp_i(l1kp),
    .l2kp_i(l2kp), .sc_gate_i(gate), .sc_reset_i(screset), .info_i(info), .irq_o(irq),
    .iack_i(iack), .iack_level_i(iack_lvl), .vector_o(vec), .vector_valid_o(vvalid),
    .reg_we_i(we), .reg_addr_i(addr), .reg_wdata_i(wdata), .reg_rdata_o(rdata), .led_o(led));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    we = 1; addr = a; wdata = d;
    @(posedge clk); #1;
    we = 0;
  endtask

  task automatic rd(input logic [2:0] a, output logic [31:0] d);
    addr = a; #1; d = rdata;
  endtask

  task automatic request(input int ch);
    irq_in[ch] = 1; repeat (2) @(posedge clk); #1;
    irq_in[ch] = 0; repeat (2) @(posedge clk); #1;
  endtask

  task automatic ack(input int level, output logic got, output logic [7:0] v);
    iack = 1; iack_lvl = 3'(level);
    @(posedge clk); #1;
    iack = 0;
    got = vvalid; v = vec;
    @(posedge clk); #1;
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d (0x%0h), expected %0d (0x%0h)", what, got, got, exp, exp); end
  endtask

  initial begin
    logic [31:0] d;
    logic got;
    logic [7:0] v;
    irq_in = 0; l2ff = 0; l1kp = 0; l2kp = 0; gate = 0; screset = 0; info = 0;
    iack = 0; iack_lvl = 0; we = 0; addr = 0; wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wr(3'd0, 32'h1FF);          // all channels enabled
    wr(3'd1, 32'h15);           // vector base
    // a single request
    request(3);
    expect_eq(int'(irq), 1 << 2, "IRQ lines after channel 3");
    ack(3, got, v);
    expect_eq(int'(got), 1, "vector given");
    expect_eq(int'(v), (8'h15 << 3) | 3, "vector of channel 3");
    expect_eq(int'(irq), 0, "released after acknowledge");
    // two requests: highest channel first
    request(2); request(6);
    ack(3, got, v);
    expect_eq(int'(v), (8'h15 << 3) | 6, "first vector");
    expect_eq(int'(irq), 1 << 2, "channel 2 still pending");
    ack(3, got, v);
    expect_eq(int'(v), (8'h15 << 3) | 2, "second vector");
    expect_eq(int'(irq), 0, "all released");
    // acknowledge of a level nobody drives
    ack(5, got, v);
    expect_eq(int'(got), 0, "no vector for idle level");
    // masked channel
    wr(3'd0, 32'h1FF & ~32'h10);
    request(4);
    expect_eq(int'(irq), 0, "masked channel");
    rd(3'd2, d);
    expect_eq(int'(d), 8'h10, "masked flip-flop still set");
    wr(3'd3, 32'h10);
    rd(3'd2, d);
    expect_eq(int'(d), 0, "cleared by register");
    wr(3'd0, 32'h1FF);
    // set by register
    wr(3'd2, 32'h81);
    expect_eq(int'(irq), 1 << 2, "set by register");
    ack(3, got, v);
    expect_eq(int'(v), (8'h15 << 3) | 7, "vector of channel 7");
    ack(3, got, v);
    expect_eq(int'(v), (8'h15 << 3) | 0, "vector of channel 0");
    // L2 Keep flip-flop on IRQ4, not released by the acknowledge
    l2ff = 1; @(posedge clk); #1;
    expect_eq(int'(irq), 1 << 3, "L2 Keep interrupt");
    ack(4, got, v);
    expect_eq(int'(got), 1, "L2 Keep vector given");
    expect_eq(int'(v), (8'h15 << 3) | 0, "L2 Keep vector");
    expect_eq(int'(irq), 1 << 3, "L2 Keep held by the Fast Card");
    l2ff = 0; @(posedge clk); #1;
    expect_eq(int'(irq), 0, "L2 Keep released");
    // gated scalers
    for (int i = 0; i < 30; i++) begin
      gate = (i >= 10 && i < 25);
      l1kp = 1; if (i % 3 == 0) l2kp = 1;
      repeat (3) @(posedge clk); #1;
      l1kp = 0; l2kp = 0;
      repeat (2) @(posedge clk); #1;
    end
    gate = 0;
    rd(3'd4, d); expect_eq(int'(d), 15, "L1 Keep scaler");
    rd(3'd5, d); expect_eq(int'(d), 5, "L2 Keep scaler");
    screset = 1; @(posedge clk); #1; screset = 0;
    rd(3'd4, d); expect_eq(int'(d), 0, "scaler reset");
    // information bits
    info = 4'hA; repeat (2) @(posedge clk); #1;
    rd(3'd6, d); expect_eq(int'(d), 10, "information register");
    expect_eq(int'(led), 10, "LEDs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
