// tb_event_pipeline -- drives one FPGA's pipeline with a random 300-bit
// pattern per bunch crossing, then drops Pipeline Enable (L1 Keep) and reads
// the event window back through the readout-register port. Checks: the
// window holds the crossings centred on the one LATENCY crossings before the
// L1 Keep, 10 words per event with chip c in words 2c/2c+1 and even parity
// in bit 30; the copy takes one clock per event; nothing is written while
// Pipeline Enable is low or the pipeline is disabled; windows of 1, 3 and 5.
module tb_event_pipeline;
  import cip_pkg::*;
  localparam int LAT = 24;
  logic clk = 0, rst = 1;
  logic run, pen, bc;
  logic [1:0] phase;
  logic [HALF_BITS-1:0] data;
  logic [2:0] window, nev;
  logic [5:0] rd_addr;
  logic [31:0] rd_data;
  logic copying, done;
  logic [HALF_BITS-1:0] hist [1024];   // data of each written crossing
  int nwritten = 0, nbc = 0;
  int checks = 0, failures = 0;

  event_pipeline dut (.clk, .rst, .run_i(run), .pen_i(pen), .bc_i(bc), .data_i(data),
                      .window_i(window), .rd_addr_i(rd_addr), .rd_data_o(rd_data),
                      .copying_o(copying), .done_o(done), .nevents_o(nev));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one new crossing every fourth clock
  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= phase + 2'd1;
  end
  assign bc = (phase == 2'd3);

  always @(posedge clk) begin
    if (!rst && bc) begin
      if (pen && run && !copying) begin
        hist[nwritten] = data;
        nwritten++;
      end
      nbc++;
    end
  end

  always @(negedge clk) begin
    if (bc) for (int i = 0; i < int'(HALF_BITS); i++) data[i] = 1'($urandom);
  end

  // run n crossings with PEn high
  task automatic crossings(input int n);
    int start;
    start = nbc;
    while (nbc < start + n) @(posedge clk);
    #1;
  endtask

  task automatic trigger_and_check(input int w);
    int t0, trig, first;
    window = 3'(w);
    @(posedge clk); #1;
    pen = 0;
    trig = nwritten - LAT;            // the crossing LATENCY crossings back
    first = trig - w / 2;
    t0 = 0;
    @(posedge clk); #1;               // this edge sees the falling edge
    while (!done) begin @(posedge clk); #1; t0++; if (t0 > 20) break; end
    checks++;
    if (t0 != w) begin failures++; $display("copy took %0d clocks for %0d events", t0, w); end
    checks++;
    if (int'(nev) != w) begin failures++; $display("nevents %0d", nev); end
    // let a few crossings pass with PEn low: they must not be written
    crossings(6);
    for (int e = 0; e < w; e++)
      for (int c = 0; c < 5; c++)
        for (int hw = 0; hw < 2; hw++) begin
          logic [29:0] pads;
          rd_addr = 6'(10*e + 2*c + hw);
          #1;
          pads = hist[first + e][60*c + 30*hw +: 30];
          checks++;
          if (rd_data[29:0] !== pads || rd_data[30] !== ^pads || rd_data[31] !== 1'b0) begin
            failures++;
            if (failures < 10) $display("window %0d event %0d chip %0d word %0d wrong", w, e, c, hw);
          end
        end
    pen = 1;
  endtask

  initial begin
    run = 0; pen = 0; window = 3'd3; rd_addr = '0; data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // disabled pipeline records nothing
    pen = 1;
    crossings(10);
    checks++;
    if (nwritten != 0) begin failures++; $display("written while disabled"); end
    run = 1;
    crossings(40);
    trigger_and_check(3);
    crossings(35);
    trigger_and_check(5);
    crossings(30);
    trigger_and_check(1);
    crossings(50);
    trigger_and_check(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
