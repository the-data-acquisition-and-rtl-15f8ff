// tb_trigger_card -- a complete trigger card on a VME bus. A behavioural CPU
// programs both FPGAs through the card's VME controller, the chamber lines
// carry random patterns with tracks, and Pipeline Enable is dropped for an
// L1 Keep. Checks: every 4-word link frame decodes to the sector histogram
// (sum of both halves, 7-bit numbers) of the crossing two crossings earlier;
// mode and remote registers of both FPGAs and the controller's own register
// read back over VME; after L1 Keep a block transfer of 10 words per event
// from each FPGA returns the event window of crossings around the one 24
// crossings back; another card address gets no DTACK*.
module tb_trigger_card;
  import cip_pkg::*;
  localparam int LAT = 24;
  localparam logic [7:0] BASE = 8'h21;
  logic clk = 0, rst = 1;
  logic [1:0] phase;
  logic [LINES-1:0] line;
  logic pen;
  logic vme_as_n, vme_write_n, vme_lword_n, vme_dtack_n, oe;
  logic [1:0] vme_ds_n;
  logic [5:0] vme_am;
  logic [23:1] vme_addr;
  logic [31:0] vme_wdata, vme_rdata, dout, link, ctrl;
  logic [599:0] cur, nxt;
  logic [599:0] pats [4096];
  logic [599:0] written [4096];
  logic [31:0] frame [4];
  int bcn = 0, nwritten = 0, run = 0;
  int checks = 0, failures = 0, nframes = 0;

  trigger_card dut (.clk, .rst, .phase_i(phase), .line_i(line), .pen_i(pen), .base_i(BASE),
    .as_n_i(vme_as_n), .ds_n_i(vme_ds_n), .write_n_i(vme_write_n), .lword_n_i(vme_lword_n),
    .am_i(vme_am), .addr_i(vme_addr), .data_i(vme_wdata), .data_o(dout), .data_oe_o(oe),
    .dtack_n_o(vme_dtack_n), .link_o(link), .ctrl_o(ctrl));
  assign vme_rdata = oe ? dout : 32'hFFFF_FFFF;
  always #5 clk = ~clk;

  `include "vme_master_tasks.svh"

  always_comb
    for (int c = 0; c < 10; c++)
      for (int j = 0; j < 15; j++)
        line[15*c + j] = cur[120*(c/2) + 60*(c%2) + 4*j + int'(phase)];

  always_ff @(posedge clk) begin
    if (rst) phase <= 2'd0;
    else     phase <= phase + 2'd1;
  end

  function automatic int ref_bin(input logic [599:0] p, input int b);
    int n;
    n = 0;
    for (int c = 0; c < 120; c++) begin
      bit all;
      all = 1;
      for (int l = 0; l < 5; l++) begin
        int q;
        q = c + ((l - 2) * (b - 7)) / 2;
        if (q < 0 || q > 119 || !p[120*l + q]) all = 0;
      end
      n += all;
    end
    return n;
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      frame[phase] = link;
      if (phase == 2'd3) begin
        if (bcn >= 2) begin
          logic [127:0] f;
          f = {frame[3], frame[2], frame[1], frame[0]};
          for (int b = 0; b < 15; b++) begin
            checks++;
            if (int'(f[7*b +: 7]) != ref_bin(pats[bcn - 2], b)) begin
              failures++;
              if (failures < 10) $display("bc %0d bin %0d: %0d expected %0d", bcn, b, f[7*b +: 7], ref_bin(pats[bcn - 2], b));
            end
          end
          nframes++;
        end
        pats[bcn] = cur;
        bcn++;
        cur <= nxt;
      end
      if (phase == 2'd0 && pen && run != 0 && bcn > 0) begin
        written[nwritten] = pats[bcn - 1];
        nwritten++;
      end
    end
  end

  always @(negedge clk) begin
    if (phase == 2'd1) begin
      for (int i = 0; i < 600; i++) nxt[i] = ($urandom_range(0, 99) < 5);
      repeat ($urandom_range(0, 4)) begin
        int c, b;
        c = $urandom_range(0, 119); b = $urandom_range(0, 14);
        for (int l = 0; l < 5; l++) begin
          int q;
          q = c + ((l - 2) * (b - 7)) / 2;
          if (q >= 0 && q < 120) nxt[120*l + q] = 1;
        end
      end
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] fpga_addr(input int h, input logic rsel, input int word);
    return {BASE, 1'b0, 1'(h), rsel, 5'd0, 6'(word), 2'b00};
  endfunction

  initial begin
    bit ok;
    logic [31:0] d;
    logic [31:0] blk [64];
    int trig;
    vme_idle();
    pen = 0; cur = '0; nxt = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (10) @(posedge clk);
    // controller register write / read back
    vme_write({BASE, 16'h8000}, 32'hCAFE_0123, ok);
    checks++; if (!ok || ctrl != 32'hCAFE_0123) begin failures++; $display("controller register write"); end
    vme_read({BASE, 16'h8000}, d, ok);
    checks++; if (!ok || d != 32'hCAFE_0123) begin failures++; $display("controller register read"); end
    // remote registers: run, window 3
    for (int h = 0; h < 2; h++) begin
      vme_write(fpga_addr(h, 1, 1), 32'h31, ok);
      vme_read(fpga_addr(h, 1, 1), d, ok);
      checks++; if (!ok || d != 32'h31) begin failures++; $display("remote register FPGA %0d: %h", h, d); end
    end
    run = 1;
    pen = 1;
    repeat (4 * 40) @(posedge clk);
    vme_read({BASE, 16'h8004}, d, ok);
    checks++; if (!ok || d[2:0] != TC_RUN || d[6:4] != TC_RUN) begin failures++; $display("card status %h", d); end
    // L1 Keep
    while (phase != 2'd2) @(posedge clk);
    #1 pen = 0;
    trig = nwritten - LAT;
    repeat (20) @(posedge clk);
    for (int h = 0; h < 2; h++) begin
      vme_read(fpga_addr(h, 1, 0), d, ok);
      checks++;
      if (!ok || d[2:0] != TC_VALID || d[6:4] != 3'd3 || d[31:16] != 16'd1) begin
        failures++; $display("mode register FPGA %0d: %h", h, d);
      end
      vme_block_read(fpga_addr(h, 0, 0), 30, blk, ok);
      checks++; if (!ok) begin failures++; $display("block read FPGA %0d: no DTACK", h); end
      for (int e = 0; e < 3; e++)
        for (int c = 0; c < 5; c++)
          for (int hw = 0; hw < 2; hw++) begin
            logic [29:0] pads;
            pads = written[trig - 1 + e][120*c + 60*h + 30*hw +: 30];
            checks++;
            if (blk[10*e + 2*c + hw] !== {1'b0, ^pads, pads}) begin
              failures++;
              if (failures < 10) $display("FPGA %0d event %0d word %0d wrong", h, e, 2*c + hw);
            end
          end
    end
    // release and restart
    for (int h = 0; h < 2; h++) vme_write(fpga_addr(h, 1, 1), 32'h33, ok);
    pen = 1;
    repeat (12) @(posedge clk);
    vme_read({BASE, 16'h8004}, d, ok);
    checks++; if (!ok || d[2:0] != TC_RUN || d[6:4] != TC_RUN) begin failures++; $display("after release %h", d); end
    // another card's address
    vme_read({8'h22, 16'h8000}, d, ok);
    checks++; if (ok) begin failures++; $display("answered for another card"); end
    checks++;
    if (nframes < 100) begin failures++; $display("only %0d link frames", nframes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
