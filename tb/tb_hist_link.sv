// tb_hist_link -- the histogram link between a trigger card and a pre-sum
// card: a sender (hist_link_tx) and a receiver (hist_link_rx) back to back.
// A new random 15x7-bit histogram is offered every bunch crossing; each must
// come out of the receiver unchanged, one bunch crossing plus one clock after
// the sender captured it (four 32-bit words in one 96 ns crossing).
module tb_hist_link;
  import cip_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] phase;
  logic [BINS*W_CARD-1:0] hin, hout;
  logic [31:0] link;
  logic vout;
  logic [BINS*W_CARD-1:0] sent [$];
  int checks = 0, failures = 0, cyc = 0, last_cap = -1;

  hist_link_tx utx (.clk, .rst, .phase_i(phase), .hist_i(hin), .link_o(link));
  hist_link_rx urx (.clk, .rst, .phase_i(phase), .link_i(link), .hist_o(hout), .valid_o(vout));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase counter and stimulus, changed just after each edge
  always_ff @(posedge clk) begin
    if (rst) phase <= 2'd0;
    else     phase <= phase + 2'd1;
  end

  initial begin
    hin = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk); #1;
      cyc++;
      if (phase == 2'd3) begin
        for (int i = 0; i < int'(BINS*W_CARD); i++) hin[i] = 1'($urandom);
      end
    end
    checks++;
    if (sent.size() > 2) begin failures++; $display("histograms lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record what the sender captures, compare what the receiver delivers
  always @(posedge clk) begin
    if (!rst && phase == 2'd3) begin
      sent.push_back(hin);
      last_cap = cyc;
    end
    if (!rst && vout) begin
      checks++;
      // the receiver's output belongs to the capture of the previous crossing
      if (sent.size() < 2) begin
        if (hout != '0) begin failures++; $display("output before any data"); end
      end else begin
        logic [BINS*W_CARD-1:0] e;
        e = sent.pop_front();
        if (hout != e) begin failures++; $display("histogram corrupted at cycle %0d", cyc); end
        checks++;
        if (cyc - last_cap != 1) begin failures++; $display("latency wrong"); end
      end
    end
  end
endmodule
