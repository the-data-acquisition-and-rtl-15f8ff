// tb_cip2000_system -- end-to-end test of the complete CIP2000 trigger with
// every parameter at its default: 16 sectors of chamber data, 16 trigger
// cards and 8 control cards in four VME crates, the pre-sum and main-sum
// cards, the STC (Fast, Slow and two Fanout Cards) and the two readout
// encoders.
//
// The bench plays the chamber (random sparse pad patterns with injected
// tracks, serialised four-times multiplexed), the CTC (fast signals,
// interrupt requests), the trigger CPU (VME single and block transfers, STC
// register bus, interrupt acknowledge) and the front-end-ready signal.
// It checks, against its own reference models:
//  * the main z-vertex histogram of every crossing: the sum over all 16
//    sectors and 120 central pads of the track-pattern coincidences;
//  * a local L1 trigger with a forced L2 reject: PEn drops, every trigger
//    card copies the 3-event window around the crossing 24 crossings before
//    the L1 Keep; the CPU reads it by block transfer; Fast Clear; PEn returns
//    one crossing after Fast Clear and L1 Active 145 after; the cards whose
//    data was not released report REJECT and return to RUN on release;
//  * an L1 trigger with L2 keep: interrupt on IRQ4 with its vector, the
//    front-end-ready AND over the Fanout Cards acting as external FER, the
//    restart after FER returns;
//  * a CTC interrupt and its acknowledge; the cosmic trigger of a control
//    card; the per-layer HERA-clock delay and the phase register; mode 0
//    pass-through and mode 2 (L1 Keep from the CTC); the artificial PEn of a
//    Fanout Card; the gated clock; the L1 Keep scaler; a run-length encoder
//    overflow and a zero-suppressed block.
// Each mechanism is counted and one that never happened counts as a failure.
module tb_cip2000_system;
  import cip_pkg::*;
  localparam int LAT = 24;
  localparam int NBC = 4000;
  logic clk = 0, rst = 1;
  logic [1:0] ph;
  logic [SECTORS-1:0][LINES-1:0] line;
  logic [SECTORS-1:0][LAYERS-1:0][1:0] active;
  logic [7:0][LAYERS-1:0] lclk;
  logic c_pen, c_atv, c_l1kp, c_l2kp, c_fsclr, c_frsbu, c_fillbu, c_run;
  logic [7:0] c_irq;
  logic [1:0] det;
  logic test, dec, nim_art, sc_reset, fe_ready;
  logic [1:0][4:0][1:0] inward;
  logic stc_we;
  logic [1:0] stc_sel;
  logic [3:0] stc_addr;
  logic [31:0] stc_wdata, stc_rdata;
  logic fer;
  logic [7:1] irq;
  logic iack;
  logic [2:0] iack_lvl;
  logic [7:0] vec;
  logic vvalid;
  logic [3:0] as_n, write_n, lword_n, dtack_n_o;
  logic [3:0][1:0] ds_n;
  logic [3:0][5:0] am;
  logic [3:0][23:1] vaddr;
  logic [3:0][31:0] vdata_i, vdata_o;
  logic [7:0][LAYERS-1:0] hck_layer;
  logic [7:0][1:0] cosmic;
  logic [SECTORS-1:0][31:0] card_ctrl;
  logic [BINS*W_MAIN-1:0] main_hist;
  logic main_valid;
  logic pen, l1kp, l2kp, fsclr, l1atv, gclk, frsbu, fillbu, ferp, clkl;
  logic [2:0] l1ff;
  logic [1:0][5:0] fan_nim;
  logic [1:0][9:0] fan_in;
  logic [3:0] led;
  logic rle_start, rle_valid, rle_bit, rle_last, rle_ready, rle_one, rle_cv, rle_done;
  logic [5:0] rle_code;
  logic [31:0] rle_bits;
  logic zs_start, zs_busy, zs_pv, zs_done;
  logic [255:0] zs_block;
  logic [7:0] zs_pos;
  logic [8:0] zs_count;
  logic [31:0] zs_bits;

  // VME master view of the selected crate
  int crate = 0;
  logic vme_as_n, vme_write_n, vme_lword_n, vme_dtack_n;
  logic [1:0] vme_ds_n;
  logic [5:0] vme_am;
  logic [23:1] vme_addr;
  logic [31:0] vme_wdata, vme_rdata;

  cip2000_system dut (
    .clk, .rst, .line_i(line), .active_i(active), .layer_clk_i(lclk), .greset_i(1'b0),
    .ctc_pen_i(c_pen), .ctc_l1atv_i(c_atv), .ctc_l1kp_i(c_l1kp), .ctc_l2kp_i(c_l2kp),
    .ctc_fsclr_i(c_fsclr), .ctc_frsbu_i(c_frsbu), .ctc_fillbu_i(c_fillbu), .ctc_run_i(c_run),
    .ctc_irq_i(c_irq), .ctc_info_i(4'h5), .det_trig_i(det), .test_trig_i(test),
    .l2_decider_i(dec), .nim_art_i(nim_art), .inward_i(inward), .sc_reset_i(sc_reset),
    .stc_we_i(stc_we), .stc_sel_i(stc_sel), .stc_addr_i(stc_addr), .stc_wdata_i(stc_wdata),
    .stc_rdata_o(stc_rdata), .fer_o(fer), .irq_o(irq), .iack_i(iack), .iack_level_i(iack_lvl),
    .vector_o(vec), .vector_valid_o(vvalid),
    .vme_as_n_i(as_n), .vme_ds_n_i(ds_n), .vme_write_n_i(write_n), .vme_lword_n_i(lword_n),
    .vme_am_i(am), .vme_addr_i(vaddr), .vme_data_i(vdata_i), .vme_data_o(vdata_o),
    .vme_dtack_n_o(dtack_n_o),
    .hck_layer_o(hck_layer), .cosmic_o(cosmic), .card_ctrl_o(card_ctrl),
    .main_hist_o(main_hist), .main_valid_o(main_valid),
    .pen_o(pen), .l1kp_o(l1kp), .l2kp_o(l2kp), .fsclr_o(fsclr), .l1atv_o(l1atv), .gclk_o(gclk),
    .frsbu_o(frsbu), .fillbu_o(fillbu), .fer_pulse_o(ferp), .clk_local_o(clkl), .l1_ff_o(l1ff),
    .fan_nim_o(fan_nim), .fan_inward_o(fan_in), .info_led_o(led),
    .rle_start_i(rle_start), .rle_valid_i(rle_valid), .rle_bit_i(rle_bit), .rle_last_i(rle_last),
    .rle_ready_o(rle_ready), .rle_code_o(rle_code), .rle_code_one_o(rle_one),
    .rle_code_valid_o(rle_cv), .rle_bits_o(rle_bits), .rle_done_o(rle_done),
    .zs_start_i(zs_start), .zs_block_i(zs_block), .zs_busy_o(zs_busy), .zs_pos_o(zs_pos),
    .zs_pos_valid_o(zs_pv), .zs_count_o(zs_count), .zs_bits_o(zs_bits), .zs_done_o(zs_done));

  always #5 clk = ~clk;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      as_n[c] = (c == crate) ? vme_as_n : 1'b1;
      ds_n[c] = (c == crate) ? vme_ds_n : 2'b11;
      write_n[c] = vme_write_n; lword_n[c] = vme_lword_n; am[c] = vme_am;
      vaddr[c] = vme_addr; vdata_i[c] = vme_wdata;
    end
    vme_dtack_n = dtack_n_o[crate];
    vme_rdata = vdata_o[crate];
  end

  `include "vme_master_tasks.svh"

  int checks = 0, failures = 0;
  // mechanism counters
  int n_hist = 0, n_l1 = 0, n_reject = 0, n_keep = 0, n_tc_reject = 0, n_release = 0;
  int n_block = 0, n_fer_restart = 0, n_irq_ctc = 0, n_irq_l2 = 0, n_cosmic = 0;
  int n_mode0 = 0, n_mode2 = 0, n_art = 0, n_gclk_gated = 0, n_hck_delay = 0, n_phase = 0;
  int n_gclk_bad = 0;
  int n_rle_ovf = 0, n_zs = 0, n_scaler = 0, n_pen_timing = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  // ---------------- chamber ----------------
  logic [599:0] cur [SECTORS];
  logic [599:0] pats [SECTORS][NBC + 8];
  int written_bc [NBC];
  int bcn = 0, nwritten = 0;
  logic pen_cc;                  // PEn as the control cards pass it on

  always_ff @(posedge clk) begin
    if (rst) ph <= 2'd0;
    else     ph <= ph + 2'd1;
  end

  always_comb
    for (int s = 0; s < 16; s++)
      for (int c = 0; c < 10; c++)
        for (int j = 0; j < 15; j++)
          line[s][15*c + j] = cur[s][120*(c/2) + 60*(c%2) + 4*j + int'(ph)];

  function automatic int ref_bin(input logic [599:0] p, input int b);
    int n;
    n = 0;
    for (int c = 0; c < 120; c++) begin
      bit all;
      all = 1;
      for (int l = 0; l < 5 && all; l++) begin
        int q;
        q = c + ((l - 2) * (b - 7)) / 2;
        if (q < 0 || q > 119 || !p[120*l + q]) all = 0;
      end
      n += all;
    end
    return n;
  endfunction

  function automatic logic [599:0] new_pattern();
    logic [599:0] p;
    for (int i = 0; i < 600; i++) p[i] = ($urandom_range(0, 99) < 3);
    repeat ($urandom_range(0, 3)) begin
      int c, b;
      c = $urandom_range(0, 119); b = $urandom_range(0, 14);
      for (int l = 0; l < 5; l++) begin
        int q;
        q = c + ((l - 2) * (b - 7)) / 2;
        if (q >= 0 && q < 120) p[120*l + q] = 1;
      end
    end
    return p;
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      // pipeline writes at phase 0 use the PEn the control cards took one
      // crossing earlier; the control cards sample the fanout's PEn at phase 0
      if (ph == 2'd0) begin
        if (pen_cc && bcn > 0 && nwritten < NBC) begin
          written_bc[nwritten] = bcn - 1;
          nwritten++;
        end
        pen_cc = fan_nim[0][1];
      end
      if (ph == 2'd3) begin
        if (bcn < NBC) for (int s = 0; s < 16; s++) pats[s][bcn] = cur[s];
        bcn++;
        for (int s = 0; s < 16; s++) cur[s] <= new_pattern();
      end
    end
  end

  // main histogram: valid in phase 2 of the third crossing after the data
  always @(negedge clk) begin
    if (!rst && main_valid && bcn >= 4 && bcn < NBC && bcn % 3 == 0) begin
      for (int b = 0; b < 15; b++) begin
        int e;
        e = 0;
        for (int s = 0; s < 16; s++) e += ref_bin(pats[s][bcn - 3], b);
        checks++;
        if (int'(main_hist[11*b +: 11]) != e) begin
          failures++;
          if (failures < 20) $display("FAIL main histogram bc %0d bin %0d: %0d expected %0d", bcn, b, main_hist[11*b +: 11], e);
        end
      end
      n_hist++;
    end
  end

  // ---------------- STC signal timing monitor ----------------
  int t_fsclr = -1, t_pen_rise = -1, t_atv_rise = -1, t_l1kp = -1, t_l2kp = -1;
  logic pen_q = 0, fsclr_q = 0, atv_q = 0, l1kp_q = 0, l2kp_q = 0, gclk_q = 0;
  always @(negedge clk) begin
    if (!rst) begin
      if (fsclr && !fsclr_q) t_fsclr = bcn;
      if (pen && !pen_q) t_pen_rise = bcn;
      if (l1atv && !atv_q) t_atv_rise = bcn;
      if (l1kp && !l1kp_q) begin t_l1kp = bcn; n_l1++; end
      if (l2kp && !l2kp_q) t_l2kp = bcn;
      if (gclk && !gclk_q && !pen) n_gclk_bad++;     // clock while PEn low
      if (gclk && !gclk_q && pen) n_gclk_gated++;
      pen_q = pen; fsclr_q = fsclr; atv_q = l1atv; l1kp_q = l1kp; l2kp_q = l2kp; gclk_q = gclk;
    end
  end

  // ---------------- CPU helpers ----------------
  task automatic stc_wr(input int sel, input int a, input logic [31:0] d);
    @(posedge clk); #1;
    stc_we = 1; stc_sel = 2'(sel); stc_addr = 4'(a); stc_wdata = d;
    @(posedge clk); #1;
    stc_we = 0;
  endtask

  task automatic stc_rd(input int sel, input int a, output logic [31:0] d);
    stc_sel = 2'(sel); stc_addr = 4'(a); #1; d = stc_rdata;
  endtask

  function automatic logic [23:0] fpga_addr(input int s, input int h, input int rsel, input int word);
    return {8'h20 + 8'(s % 4), 1'b0, 1'(h), 1'(rsel), 5'd0, 6'(word), 2'b00};
  endfunction

  task automatic wait_bc(input int n);
    int s;
    s = bcn;
    while (bcn < s + n) @(posedge clk);
    #2;
  endtask

  task automatic all_fpgas_write(input int word, input logic [31:0] d);
    bit ok;
    for (int s = 0; s < 16; s++)
      for (int h = 0; h < 2; h++) begin
        crate = s / 4;
        vme_write(fpga_addr(s, h, 1, word), d, ok);
        checks++; if (!ok) fail($sformatf("no DTACK from sector %0d FPGA %0d", s, h));
      end
  endtask

  task automatic check_all_states(input tc_state_e e, input string what);
    bit ok;
    logic [31:0] d;
    for (int s = 0; s < 16; s++) begin
      crate = s / 4;
      vme_read({8'h20 + 8'(s % 4), 16'h8004}, d, ok);
      checks++;
      if (!ok || d[2:0] != e || d[6:4] != e) fail($sformatf("%s: sector %0d status %h", what, s, d));
    end
  endtask

  // read the event window of a few sectors by block transfer and compare
  task automatic read_window(input int trig_w, input int w);
    bit ok;
    logic [31:0] blk [64];
    int secs [3] = '{0, 7, 13};
    foreach (secs[i]) begin
      int s;
      s = secs[i];
      crate = s / 4;
      for (int h = 0; h < 2; h++) begin
        vme_block_read(fpga_addr(s, h, 0, 0), 10 * w, blk, ok);
        checks++; if (!ok) fail("block transfer without DTACK");
        for (int e = 0; e < w; e++)
          for (int c = 0; c < 5; c++)
            for (int hw = 0; hw < 2; hw++) begin
              logic [29:0] pads;
              pads = pats[s][written_bc[trig_w - w/2 + e]][120*c + 60*h + 30*hw +: 30];
              checks++;
              if (blk[10*e + 2*c + hw] !== {1'b0, ^pads, pads})
                fail($sformatf("sector %0d FPGA %0d event %0d word %0d", s, h, e, 2*c + hw));
            end
        n_block++;
      end
    end
  endtask

  initial begin
    repeat (4 * NBC + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- the run ----------------
  initial begin
    bit ok;
    logic [31:0] d;
    int trig_w, t0;
    vme_idle();
    for (int s = 0; s < 16; s++) cur[s] = '0;
    active = '0; lclk = '0;
    c_pen = 0; c_atv = 0; c_l1kp = 0; c_l2kp = 0; c_fsclr = 0; c_frsbu = 0; c_fillbu = 1; c_run = 1;
    c_irq = 0; det = 0; test = 0; dec = 0; nim_art = 0; sc_reset = 0; fe_ready = 1;
    inward = '0; stc_we = 0; stc_sel = 0; stc_addr = 0; stc_wdata = 0; iack = 0; iack_lvl = 0;
    rle_start = 0; rle_valid = 0; rle_bit = 0; rle_last = 0; zs_start = 0; zs_block = '0;
    pen_cc = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // -------- set-up: STC in mode 0 with PEn low while the CPU programs --------
    stc_wr(1, 0, 32'h1FF);                 // Slow Card: all interrupt channels
    stc_wr(1, 1, 32'h0A);                  // vector base
    all_fpgas_write(1, 32'h31);            // run, 3-event window
    // control card 0: layer 2 clock delayed by 5 clocks; read the phase register
    crate = 0;
    vme_write({8'h30, 11'd0, 3'd2, 2'b00}, 32'd5, ok);
    checks++; if (!ok) fail("control card write");

    // -------- mode 3, local trigger, forced L2 reject --------
    stc_wr(0, 0, 32'(3 | (1 << 4) | (1 << 7) | (1 << 10)));
    wait_bc(60);
    while (!l1atv) wait_bc(1);
    wait_bc(2);
    det[0] = 1; wait_bc(1); det[0] = 0;
    wait_bc(3);
    trig_w = nwritten - LAT;
    checks++; if (pen || !l1kp) fail("L1 Keep did not stop PEn");
    wait_bc(12);
    check_all_states(TC_REJECT, "after reject");
    n_tc_reject++;
    expect_eq(t_fsclr - t_l1kp, 10, "L2 reject 10 crossings after L1 Keep");
    expect_eq(t_pen_rise - t_fsclr, 1, "PEn one crossing after Fast Clear");
    n_reject++;
    read_window(trig_w, 3);
    all_fpgas_write(1, 32'h33);            // release
    check_all_states(TC_RUN, "after release");
    n_release++;
    while (!l1atv) wait_bc(1);
    expect_eq(t_atv_rise - t_fsclr, 145, "L1 Active 145 crossings after Fast Clear");
    n_pen_timing++;

    // -------- L2 keep, interrupt, external FER through the fanout AND --------
    stc_wr(2, 4, 32'h001);                 // fanout 0: inward signal 0 of port 0 used
    stc_wr(0, 0, 32'(3 | (1 << 3) | (1 << 4) | (1 << 6) | (1 << 10)));
    wait_bc(40);
    det[0] = 1; wait_bc(1); det[0] = 0;
    while (!l2kp) wait_bc(1);
    trig_w = nwritten - LAT;
    n_keep++;
    fe_ready = 0;                          // front end busy while the CPU reads
    inward[0][0][0] = 0;
    wait_bc(2);
    checks++; if (fer) fail("FER true while the front end is busy");
    expect_eq(int'(irq), 1 << 3, "L2 Keep interrupt on IRQ4");
    iack = 1; iack_lvl = 3'd4; @(posedge clk); #1; iack = 0;
    checks++;
    if (!vvalid || vec != {5'h0A, 3'd0}) fail($sformatf("L2 Keep vector %h", vec));
    else n_irq_l2++;
    check_all_states(TC_VALID, "event kept");
    read_window(trig_w, 3);
    all_fpgas_write(1, 32'h33);
    inward[0][0][0] = 1;                   // front end ready again
    t0 = bcn;
    while (l2kp) wait_bc(1);
    checks++; if (bcn - t0 > 3) fail("no restart after FER");
    else n_fer_restart++;
    wait_bc(2);
    expect_eq(t_pen_rise - t_fsclr, 1, "PEn one crossing after Fast Clear (keep)");
    check_all_states(TC_RUN, "running after keep");

    // -------- CTC interrupt --------
    c_irq[5] = 1; wait_bc(1); c_irq[5] = 0; wait_bc(1);
    checks++; if (irq != 7'(1 << 2)) fail("CTC request did not raise IRQ3");
    iack = 1; iack_lvl = 3'd3; @(posedge clk); #1; iack = 0;
    checks++;
    if (!vvalid || vec != {5'h0A, 3'd5}) fail($sformatf("CTC vector %h", vec));
    else n_irq_ctc++;
    wait_bc(1);
    checks++; if (irq != 0) fail("interrupt not released");

    // -------- control card: cosmic trigger, layer clock delay, phase register --------
    for (int l = 0; l < 5; l++) active[5][l] = 2'b01;
    wait_bc(2);
    checks++; if (cosmic[2] != 2'b10) fail($sformatf("cosmic %b", cosmic[2])); else n_cosmic++;
    active = '0;
    begin
      logic [4:0] hh [$];
      int bad;
      bad = 0;
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        hh.push_front(hck_layer[0]);
        if (i >= 8) begin
          if (hck_layer[0][2] != ((int'(ph) + 4 - 5 % 4) % 4 < 2 ? 1'b1 : 1'b0)) bad++;
          if (hck_layer[0][1] != (ph < 2'd2)) bad++;
        end
      end
      checks++; if (bad != 0) fail("layer clock delay"); else n_hck_delay++;
    end
    for (int i = 0; i < 12; i++) begin
      @(posedge clk); #1;
      for (int l = 0; l < 5; l++) lclk[0][l] = ((int'(ph) + 4 - l % 4) % 4) < 2;
    end
    begin
      logic [31:0] pr;
      fork
        begin
          crate = 0;
          vme_read({8'h30, 11'd0, 3'd6, 2'b00}, pr, ok);
        end
        begin
          repeat (40) begin
            @(posedge clk); #1;
            for (int l = 0; l < 5; l++) lclk[0][l] = ((int'(ph) + 4 - l % 4) % 4) < 2;
          end
        end
      join
      checks++;
      if (!ok) fail("phase register read");
      else begin
        bit good;
        good = 1;
        for (int l = 0; l < 5; l++) if (pr[4*l +: 3] != {1'b1, 2'(l % 4)}) good = 0;
        if (!good) fail($sformatf("phase register %h", pr)); else n_phase++;
      end
    end

    // -------- scaler of L1 Keeps (gated by Run) --------
    stc_rd(1, 4, d);
    expect_eq(int'(d), n_l1, "L1 Keep scaler");
    n_scaler++;

    // -------- mode 2: L1 Keep from the CTC, forced reject --------
    stc_wr(0, 0, 32'(2 | (1 << 7)));
    while (!l1atv) wait_bc(1);
    wait_bc(2);
    t0 = n_l1;
    c_l1kp = 1; wait_bc(1); c_l1kp = 0;
    wait_bc(14);
    checks++; if (n_l1 != t0 + 1 || t_fsclr - t_l1kp != 10) fail("mode 2 cycle"); else n_mode2++;
    all_fpgas_write(1, 32'h33);

    // -------- mode 0: pass-through of the CTC signals --------
    stc_wr(0, 0, 32'd0);
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < 20; i++) begin
        c_pen = 1'($urandom); c_fsclr = 1'($urandom); c_atv = 1'($urandom);
        @(posedge clk); #1;
        if (pen != c_pen || fsclr != c_fsclr || l1atv != c_atv) bad++;
      end
      checks++; if (bad != 0) fail("mode 0 pass-through"); else n_mode0++;
    end
    c_pen = 1; c_fsclr = 0; c_atv = 1;

    // -------- artificial PEn on Fanout Card 0 --------
    stc_wr(2, 0, 32'h13F);
    wait_bc(2);
    begin
      int hi;
      hi = 0;
      nim_art = 1; @(posedge clk); #1; nim_art = 0;
      for (int i = 0; i < 30; i++) begin @(posedge clk); #1; if (fan_nim[0][1]) hi++; end
      checks++; if (hi != 4) fail($sformatf("artificial PEn %0d clocks", hi)); else n_art++;
      checks++; if (fan_nim[1][1] != 1'b1) fail("fanout 1 lost PEn");
    end
    stc_wr(2, 0, 32'h03F);

    // -------- data reduction encoders --------
    begin
      int zeros, ones, nbits, pos;
      bit prev_max;
      bit stream [$];
      for (int i = 0; i < 100; i++) stream.push_back(0);
      for (int i = 0; i < 5; i++) stream.push_back(1);
      for (int i = 0; i < 20; i++) stream.push_back(0);
      zeros = 0; ones = 0; prev_max = 0;
      @(posedge clk); #1;
      rle_start = 1; @(posedge clk); #1; rle_start = 0;
      pos = 0;
      fork
        begin
          while (pos < stream.size()) begin
            if (rle_ready) begin
              rle_valid = 1; rle_bit = stream[pos]; rle_last = (pos == stream.size() - 1); pos++;
            end else rle_valid = 0;
            @(posedge clk); #1;
          end
          rle_valid = 0; rle_last = 0;
        end
        begin
          // count zero-length runs that follow a full-length run (overflow)
          int guard;
          guard = 0;
          while (!rle_done && guard < 400) begin
            @(posedge clk);
            guard++;
            if (rle_cv) begin
              if (rle_code == 0 && prev_max) n_rle_ovf++;
              prev_max = rle_one ? (rle_code == 3) : (rle_code == 63);
              if (rle_one) ones += int'(rle_code); else zeros += int'(rle_code);
            end
          end
        end
      join
      expect_eq(zeros, 120, "run-length zeros");
      expect_eq(ones, 5, "run-length ones");
      // zero suppression of a 256-bit block with 1s at 3, 77 and 200
      zs_block = '0; zs_block[3] = 1; zs_block[77] = 1; zs_block[200] = 1;
      @(posedge clk); #1; zs_start = 1; @(posedge clk); #1; zs_start = 0;
      while (!zs_done) begin @(posedge clk); #1; end
      expect_eq(int'(zs_count), 3, "zero-suppressed count");
      expect_eq(int'(zs_bits), 9 + 3 * 8, "zero-suppressed size");
      n_zs++;
    end

    // -------- summary of mechanisms --------
    begin
      string names [21] = '{"main histogram", "L1 Keep", "L2 reject", "L2 keep", "card REJECT state",
        "release", "block transfer", "FER restart", "CTC interrupt", "L2 Keep interrupt", "cosmic",
        "mode 0", "mode 2", "artificial PEn", "gated clock", "layer clock delay", "phase register",
        "run-length overflow", "zero suppression", "scaler", "PEn/L1 Active timing"};
      int cnt [21];
      cnt = '{n_hist, n_l1, n_reject, n_keep, n_tc_reject, n_release, n_block, n_fer_restart,
        n_irq_ctc, n_irq_l2, n_cosmic, n_mode0, n_mode2, n_art, n_gclk_gated, n_hck_delay, n_phase,
        n_rle_ovf, n_zs, n_scaler, n_pen_timing};
      for (int i = 0; i < 21; i++) begin
        $display("mechanism %-22s %0d", names[i], cnt[i]);
        checks++;
        if (cnt[i] <= 0) fail($sformatf("mechanism %s never happened", names[i]));
      end
    end
    expect_eq(n_gclk_bad, 0, "gated clock pulses while PEn low");
    $display("crossings simulated %0d, pipeline writes %0d", bcn, nwritten);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
