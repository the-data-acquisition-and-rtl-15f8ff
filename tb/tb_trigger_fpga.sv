// tb_trigger_fpga -- both FPGAs of a trigger card (HALF = 0 and 1) fed with
// the same serialised chamber data: a random sparse pattern per bunch
// crossing with straight and inclined tracks added. Checks: each local
// histogram equals the reference count of track patterns in its half, three
// clocks after the phase-3 sample; the mode register walks IDLE -> RUN ->
// COPY -> VALID on L1 Keep, VALID -> REJECT when Pipeline Enable returns
// before the release, and back to RUN on release; the readout register of
// each FPGA holds its half of the window of crossings around the one 24
// crossings before L1 Keep; the event counter counts windows.
module tb_trigger_fpga;
  import cip_pkg::*;
  localparam int LAT = 24;
  logic clk = 0, rst = 1;
  logic [1:0] phase;
  logic [LINES-1:0] line;
  logic pen;
  logic req [2], we [2], sel [2];
  logic [5:0] addr [2];
  logic [31:0] wdata [2], rdata [2];
  logic [BINS*W_FPGA-1:0] hist [2];
  logic hv [2];
  tc_state_e st [2];
  logic [599:0] cur, nxt;
  logic [599:0] sent [$];           // pattern of each completed crossing
  logic [599:0] written [1024];     // patterns stored in the pipeline
  int nwritten = 0, run = 0;
  int checks = 0, failures = 0, nhist = 0, ntracks = 0;

  for (genvar h = 0; h < 2; h++) begin : g_dut
    trigger_fpga #(.HALF(h)) dut (.clk, .rst, .phase_i(phase), .line_i(line), .pen_i(pen),
      .req_i(req[h]), .we_i(we[h]), .reg_sel_i(sel[h]), .addr_i(addr[h]), .wdata_i(wdata[h]),
      .rdata_o(rdata[h]), .hist_o(hist[h]), .hist_valid_o(hv[h]), .state_o(st[h]));
  end
  always #5 clk = ~clk;

  // serialiser: line 15*chip + j carries pad 4j + phase of chip = 2*layer + half
  always_comb
    for (int c = 0; c < 10; c++)
      for (int j = 0; j < 15; j++)
        line[15*c + j] = cur[120*(c/2) + 60*(c%2) + 4*j + int'(phase)];

  always_ff @(posedge clk) begin
    if (rst) phase <= 2'd0;
    else     phase <= phase + 2'd1;
  end

  function automatic bit ref_hit(input logic [599:0] p, input int c, input int b);
    for (int l = 0; l < 5; l++) begin
      int q;
      q = c + ((l - 2) * (b - 7)) / 2;
      if (q < 0 || q > 119 || !p[120*l + q]) return 0;
    end
    return 1;
  endfunction

  // new pattern every crossing, presented from phase 0 on
  always @(posedge clk) begin
    if (!rst && phase == 2'd3) begin
      sent.push_back(cur);
      cur <= nxt;
    end
    if (!rst && phase == 2'd0 && pen && run != 0) begin
      written[nwritten] = sent[sent.size() - 1];
      nwritten++;
    end
  end
  always @(negedge clk) begin
    if (phase == 2'd1) begin
      for (int i = 0; i < 600; i++) nxt[i] = ($urandom_range(0, 99) < 4);
      repeat ($urandom_range(0, 3)) begin
        int c, b;
        c = $urandom_range(0, 119); b = $urandom_range(0, 14);
        for (int l = 0; l < 5; l++) begin
          int q;
          q = c + ((l - 2) * (b - 7)) / 2;
          if (q >= 0 && q < 120) nxt[120*l + q] = 1;
        end
        ntracks++;
      end
    end
  end

  // histogram check: hv comes in phase 2 of the crossing after the pattern
  always @(posedge clk) begin
    if (!rst && hv[0] && sent.size() > 0) begin
      logic [599:0] p;
      p = sent[sent.size() - 1];
      for (int h = 0; h < 2; h++) begin
        checks++;
        if (!hv[h]) failures++;
        for (int b = 0; b < 15; b++) begin
          int n;
          n = 0;
          for (int k = 0; k < 60; k++) n += ref_hit(p, 60*h + k, b);
          checks++;
          if (int'(hist[h][6*b +: 6]) != n) begin
            failures++;
            if (failures < 10) $display("FPGA %0d bin %0d: %0d expected %0d", h, b, hist[h][6*b +: 6], n);
          end
        end
      end
      nhist++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reg_write(input int h, input logic s, input logic [5:0] a, input logic [31:0] d);
    req[h] = 1; we[h] = 1; sel[h] = s; addr[h] = a; wdata[h] = d;
    @(posedge clk); #1;
    req[h] = 0; we[h] = 0;
  endtask

  task automatic reg_read(input int h, input logic s, input logic [5:0] a, output logic [31:0] d);
    sel[h] = s; addr[h] = a;
    #1;
    d = rdata[h];
  endtask

  task automatic wait_bc(input int n);
    repeat (4 * n) @(posedge clk);
    #1;
  endtask

  task automatic check_state(input tc_state_e e, input string what);
    for (int h = 0; h < 2; h++) begin
      logic [31:0] m;
      reg_read(h, 1'b1, 6'd0, m);
      checks++;
      if (st[h] != e || m[2:0] != e) begin
        failures++; $display("FPGA %0d %s: state %0d expected %0d", h, what, st[h], e);
      end
    end
  endtask

  task automatic l1_keep_and_read(input int w, input int nexp);
    int trig;
    // drop PEn just after a phase-1 edge
    while (phase != 2'd2) begin @(posedge clk); #1; end
    pen = 0;
    trig = nwritten - LAT;
    repeat (2) @(posedge clk); #1;
    check_state(TC_COPY, "during copy");
    wait_bc(3);
    check_state(TC_VALID, "after copy");
    for (int h = 0; h < 2; h++) begin
      logic [31:0] m;
      reg_read(h, 1'b1, 6'd0, m);
      checks++;
      if (int'(m[6:4]) != w || int'(m[31:16]) != nexp) begin
        failures++; $display("FPGA %0d mode register %h", h, m);
      end
      for (int e = 0; e < w; e++)
        for (int c = 0; c < 5; c++)
          for (int hw = 0; hw < 2; hw++) begin
            logic [31:0] d;
            logic [29:0] pads;
            reg_read(h, 1'b0, 6'(10*e + 2*c + hw), d);
            pads = written[trig - w/2 + e][120*c + 60*h + 30*hw +: 30];
            checks++;
            if (d[29:0] !== pads || d[30] !== ^pads) begin
              failures++;
              if (failures < 10) $display("FPGA %0d event %0d chip %0d word %0d wrong", h, e, c, hw);
            end
          end
    end
  endtask

  initial begin
    pen = 0; cur = '0; nxt = '0;
    for (int h = 0; h < 2; h++) begin req[h] = 0; we[h] = 0; sel[h] = 0; addr[h] = 0; wdata[h] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait_bc(3);
    check_state(TC_IDLE, "after reset");
    // enable the pipeline with a 3-event window
    for (int h = 0; h < 2; h++) reg_write(h, 1'b1, 6'd1, 32'h31);
    run = 1;
    pen = 1;
    wait_bc(2);
    check_state(TC_RUN, "running");
    wait_bc(40);
    l1_keep_and_read(3, 1);
    // Pipeline Enable comes back before the CPU releases: REJECT
    pen = 1;
    wait_bc(2);
    check_state(TC_REJECT, "PEn back too early");
    for (int h = 0; h < 2; h++) reg_write(h, 1'b1, 6'd1, 32'h53);   // release, window 5
    wait_bc(1);
    check_state(TC_RUN, "released");
    wait_bc(35);
    l1_keep_and_read(5, 2);
    for (int h = 0; h < 2; h++) reg_write(h, 1'b1, 6'd1, 32'h53);
    pen = 1;
    wait_bc(2);
    check_state(TC_RUN, "released in time");
    // disable
    for (int h = 0; h < 2; h++) reg_write(h, 1'b1, 6'd1, 32'h50);
    run = 0;
    wait_bc(1);
    check_state(TC_IDLE, "disabled");
    checks++;
    if (nhist < 50) begin failures++; $display("only %0d histograms", nhist); end
    $display("histograms %0d, tracks injected %0d", nhist, ntracks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
