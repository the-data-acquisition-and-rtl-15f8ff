// tb_control_card -- control card on a VME bus. Checks: the five per-layer
// HERA-clock outputs follow the bunch-crossing clock (high in phases 0 and 1)
// delayed by the programmed number of fast clocks; Pipeline Enable is taken
// over only at phase 0 and then delayed by the programmed amount; the phase
// register reports, per layer, the phase in which the returned layer clock
// rose; the cosmic trigger fires for a sector with all five layers active
// and not when one layer is empty; registers read back over VME.
module tb_control_card;
  import cip_pkg::*;
  localparam logic [7:0] BASE = 8'h30;
  logic clk = 0, rst = 1;
  logic [1:0] phase;
  logic pen, greset, pen_o, greset_o;
  logic [4:0] lclk, hck_o;
  logic [1:0][4:0][1:0] active;
  logic [1:0] cosmic;
  logic vme_as_n, vme_write_n, vme_lword_n, vme_dtack_n, oe;
  logic [1:0] vme_ds_n;
  logic [5:0] vme_am;
  logic [23:1] vme_addr;
  logic [31:0] vme_wdata, vme_rdata, dout;
  logic hck_hist [$];
  logic sync_hist [$];
  logic pen_sync_ref;
  int lclk_off [5] = '{0, 1, 2, 3, 1};
  int checks = 0, failures = 0, nhck = 0, npen_edges = 0, ncosmic = 0;
  int dly [5], pdly;
  bit checking = 0;

  control_card dut (.clk, .rst, .phase_i(phase), .pen_i(pen), .greset_i(greset),
    .layer_clk_i(lclk), .active_i(active), .base_i(BASE),
    .as_n_i(vme_as_n), .ds_n_i(vme_ds_n), .write_n_i(vme_write_n), .lword_n_i(vme_lword_n),
    .am_i(vme_am), .addr_i(vme_addr), .data_i(vme_wdata), .data_o(dout), .data_oe_o(oe),
    .dtack_n_o(vme_dtack_n), .pen_o(pen_o), .greset_o(greset_o), .hck_layer_o(hck_o),
    .cosmic_o(cosmic));
  assign vme_rdata = oe ? dout : 32'hFFFF_FFFF;
  always #5 clk = ~clk;

  `include "vme_master_tasks.svh"

  always_ff @(posedge clk) begin
    if (rst) phase <= 2'd0;
    else     phase <= phase + 2'd1;
  end

  // returned layer clocks: the HERA clock shifted by lclk_off[l] fast clocks
  always_comb
    for (int l = 0; l < 5; l++) lclk[l] = ((int'(phase) + 4 - lclk_off[l]) % 4) < 2;

  // reference: HERA clock history and phase-0 synchronised PEn history,
  // sampled in the middle of each clock
  always @(negedge clk) begin
    if (!rst) begin
      hck_hist.push_front(phase < 2'd2);
      if (hck_hist.size() > 20) void'(hck_hist.pop_back());
      sync_hist.push_front(pen_sync_ref);
      if (sync_hist.size() > 20) void'(sync_hist.pop_back());
      if (checking) begin
        for (int l = 0; l < 5; l++) begin
          checks++;
          if (hck_o[l] != hck_hist[dly[l]]) begin
            failures++;
            if (failures < 10) $display("layer %0d clock wrong (delay %0d)", l, dly[l]);
          end
        end
        nhck++;
        checks++;
        if (pen_o != sync_hist[pdly]) begin
          failures++;
          if (failures < 10) $display("PEn output wrong (delay %0d)", pdly);
        end
      end
    end
  end
  always @(posedge clk) begin
    if (rst) pen_sync_ref <= 0;
    else if (phase == 2'd0) pen_sync_ref <= pen;
    if (!rst && pen_o && !$past(pen_o)) npen_edges++;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // toggle PEn at random times
  task automatic run_pen(input int n);
    for (int i = 0; i < n; i++) begin
      repeat ($urandom_range(1, 13)) @(posedge clk);
      #2 pen = ~pen;
    end
  endtask

  initial begin
    bit ok;
    logic [31:0] d;
    vme_idle();
    pen = 0; greset = 0; active = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int l = 0; l < 5; l++) dly[l] = 0;
    pdly = 0;
    repeat (30) @(posedge clk);
    checking = 1;
    run_pen(20);
    // program delays
    for (int round = 0; round < 3; round++) begin
      checking = 0;
      for (int l = 0; l < 5; l++) begin
        dly[l] = $urandom_range(0, 15);
        vme_write({BASE, 11'd0, 3'(l), 2'b00}, 32'(dly[l]), ok);
        checks++; if (!ok) begin failures++; $display("no DTACK"); end
      end
      pdly = $urandom_range(0, 15);
      vme_write({BASE, 11'd0, 3'd5, 2'b00}, 32'(pdly), ok);
      for (int l = 0; l < 5; l++) begin
        vme_read({BASE, 11'd0, 3'(l), 2'b00}, d, ok);
        checks++; if (!ok || d != 32'(dly[l])) begin failures++; $display("delay register %0d reads %0d", l, d); end
      end
      repeat (20) @(posedge clk);
      checking = 1;
      run_pen(30);
    end
    // phase register
    vme_read({BASE, 11'd0, 3'd6, 2'b00}, d, ok);
    for (int l = 0; l < 5; l++) begin
      checks++;
      if (!ok || d[4*l +: 3] != {1'b1, 2'(lclk_off[l])}) begin
        failures++; $display("phase of layer %0d: %0d expected %0d", l, d[4*l +: 3], lclk_off[l]);
      end
    end
    // cosmic trigger: sector 1 with every layer active (one half or the other)
    @(posedge clk); #1;
    for (int l = 0; l < 5; l++) active[1][l] = 2'(1 << (l % 2));
    repeat (4) @(posedge clk); #1;
    active = '0;
    checks++;
    if (cosmic != 2'b10) begin failures++; $display("cosmic %b", cosmic); end
    else ncosmic++;
    repeat (4) @(posedge clk); #1;
    checks++;
    if (cosmic != 2'b00) begin failures++; $display("cosmic not cleared"); end
    // one layer empty: no cosmic trigger
    for (int l = 0; l < 4; l++) active[0][l] = 2'b11;
    repeat (8) @(posedge clk); #1;
    checks++;
    if (cosmic != 2'b00) begin failures++; $display("cosmic with an empty layer"); end
    active = '0;
    // global reset is passed on
    greset = 1; repeat (2) @(posedge clk); #1;
    checks++; if (!greset_o) begin failures++; $display("global reset not passed"); end
    greset = 0; repeat (2) @(posedge clk); #1;
    checks++; if (greset_o) begin failures++; $display("global reset stuck"); end
    checks++;
    if (nhck < 500 || npen_edges < 10 || ncosmic != 1) begin
      failures++; $display("too little activity: %0d %0d %0d", nhck, npen_edges, ncosmic);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
