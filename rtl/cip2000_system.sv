// cip2000_system -- the CIP2000 z-vertex trigger with its readout and
// control logic, as one synthesizable top.
//
// Trigger path: the chamber data of each of the 16 sectors in phi (150 lines,
// four times multiplexed) enters one trigger card. Its two FPGAs find
// tracks, build local histograms and keep the data in pipelines; FPGA 0 sends
// the 15-bin sector histogram over a 32-bit link. Two pre-sum cards add
// sectors 0-7 and 8-15, the main-sum card adds both into the main z-vertex
// histogram (15 bins x 11 bits), which leaves on main_hist_o.
//
// Crates: four trigger crates hold four trigger cards and two control cards
// each, on one VME bus per crate (the trigger CPUs, which are commercial
// boards, are outside: their VME buses are ports). Trigger card k of a crate
// answers at A23..A16 = 0x20+k, control card j at 0x30+j.
//
// Control path: the STC Fast Card takes the CTC's fast signals (or makes its
// own in modes 2-4); two STC Fanout Cards pass HERA clock, Pipeline Enable,
// L1 Keep, L2 Keep, Fast Clear and Run to the eight control cards, which
// synchronise and delay Pipeline Enable for the trigger cards of their two
// sectors. A falling Pipeline Enable is the L1 Keep for the trigger cards,
// a rising one restarts the pipelines. The STC Slow Card turns CTC requests
// and the L2 Keep into VME interrupts for the main trigger CPU. The STC cards'
// registers, which the main trigger CPU reaches over a VIC crate link, are
// on a simple register bus (stc_sel_i: 0 fast, 1 slow, 2/3 fanout 0/1).
// The Front End Ready of the subsystem is the inward AND of fanout card 0
// (fed by card 1), used by the Fast Card when its FER source is external.
//
// Data reduction: the run-length and zero-suppression encoders that reduce
// the read-out pad data stand beside the rest with their own ports.
//
// Clocking: one clock, the 41.6 MHz FPGA clock, with a free-running 2-bit
// bunch-crossing phase (four cycles = one 96 ns bunch crossing), which all
// cards share; the HERA clock is derived from it.
module cip2000_system
  import cip_pkg::*;
#(
  parameter int unsigned DEPTH   = 32,
  parameter int unsigned LATENCY = 24,
  parameter int unsigned RLE_W0  = 6,
  parameter int unsigned RLE_W1  = 2,
  parameter int unsigned ZS_N    = 8
) (
  input  logic        clk,
  input  logic        rst,
  // chamber data, per sector
  input  logic [SECTORS-1:0][LINES-1:0] line_i,
  // CIPiX empty-word information (1 = pads active), per sector, layer, half
  input  logic [SECTORS-1:0][LAYERS-1:0][1:0] active_i,
  // clocks returned by the optical readout of each layer, per control card
  input  logic [7:0][LAYERS-1:0] layer_clk_i,
  input  logic        greset_i,
  // CTC outward signals
  input  logic        ctc_pen_i,
  input  logic        ctc_l1atv_i,
  input  logic        ctc_l1kp_i,
  input  logic        ctc_l2kp_i,
  input  logic        ctc_fsclr_i,
  input  logic        ctc_frsbu_i,
  input  logic        ctc_fillbu_i,
  input  logic        ctc_run_i,
  input  logic [7:0]  ctc_irq_i,
  input  logic [3:0]  ctc_info_i,
  // local trigger inputs of the STC
  input  logic [1:0]  det_trig_i,
  input  logic        test_trig_i,
  input  logic        l2_decider_i,
  input  logic        nim_art_i,
  input  logic [1:0][4:0][1:0] inward_i,   // [fanout card][port][signal]
  input  logic        sc_reset_i,
  // STC register bus
  input  logic        stc_we_i,
  input  logic [1:0]  stc_sel_i,
  input  logic [3:0]  stc_addr_i,
  input  logic [31:0] stc_wdata_i,
  output logic [31:0] stc_rdata_o,
  // STC to CTC and to the main trigger CPU
  output logic        fer_o,
  output logic [7:1]  irq_o,
  input  logic        iack_i,
  input  logic [2:0]  iack_level_i,
  output logic [7:0]  vector_o,
  output logic        vector_valid_o,
  // VME bus of each trigger crate
  input  logic [3:0]        vme_as_n_i,
  input  logic [3:0][1:0]   vme_ds_n_i,
  input  logic [3:0]        vme_write_n_i,
  input  logic [3:0]        vme_lword_n_i,
  input  logic [3:0][5:0]   vme_am_i,
  input  logic [3:0][23:1]  vme_addr_i,
  input  logic [3:0][31:0]  vme_data_i,
  output logic [3:0][31:0]  vme_data_o,
  output logic [3:0]        vme_dtack_n_o,
  // control-card outputs
  output logic [7:0][LAYERS-1:0] hck_layer_o,
  output logic [7:0][1:0]   cosmic_o,
  output logic [SECTORS-1:0][31:0] card_ctrl_o,
  // main z-vertex histogram
  output logic [BINS*W_MAIN-1:0] main_hist_o,
  output logic        main_valid_o,
  // STC observation
  output logic        pen_o,
  output logic        l1kp_o,
  output logic        l2kp_o,
  output logic        fsclr_o,
  output logic        l1atv_o,
  output logic        gclk_o,
  output logic        frsbu_o,
  output logic        fillbu_o,
  output logic        fer_pulse_o,
  output logic        clk_local_o,
  output logic [2:0]  l1_ff_o,
  output logic [1:0][5:0] fan_nim_o,
  output logic [1:0][9:0] fan_inward_o,
  output logic [3:0]  info_led_o,
  // run-length encoder
  input  logic        rle_start_i,
  input  logic        rle_valid_i,
  input  logic        rle_bit_i,
  input  logic        rle_last_i,
  output logic        rle_ready_o,
  output logic [((RLE_W0 > RLE_W1) ? RLE_W0 : RLE_W1)-1:0] rle_code_o,
  output logic        rle_code_one_o,
  output logic        rle_code_valid_o,
  output logic [31:0] rle_bits_o,
  output logic        rle_done_o,
  // zero-suppression encoder
  input  logic        zs_start_i,
  input  logic [(1<<ZS_N)-1:0] zs_block_i,
  output logic        zs_busy_o,
  output logic [ZS_N-1:0] zs_pos_o,
  output logic        zs_pos_valid_o,
  output logic [ZS_N:0] zs_count_o,
  output logic [31:0] zs_bits_o,
  output logic        zs_done_o
);
  // ---------------- bunch-crossing phase ----------------
  logic [1:0] phase;
  always_ff @(posedge clk) begin
    if (rst) phase <= 2'd0;
    else     phase <= phase + 2'd1;
  end
  wire bc  = (phase == 2'd3);
  wire hck = (phase < 2'd2);

  // ---------------- STC ----------------
  logic        run;
  logic [31:0] rd_fast, rd_slow, rd_fan [2];
  logic [4:0][5:0] fan_port [2];
  logic        fan_gclk [2];
  logic        fan_and [2];

  stc_fast_card u_fast (
    .clk, .rst, .bc_i(bc),
    .ctc_pen_i, .ctc_l1atv_i, .ctc_l1kp_i, .ctc_l2kp_i, .ctc_fsclr_i,
    .ctc_frsbu_i, .ctc_fillbu_i, .ctc_run_i,
    .det_trig_i, .test_trig_i, .l2_decider_i, .fer_ext_i(fan_and[0]),
    .reg_we_i(stc_we_i && stc_sel_i == 2'd0), .reg_addr_i(stc_addr_i),
    .reg_wdata_i(stc_wdata_i), .reg_rdata_o(rd_fast),
    .pen_o, .l1atv_o, .l1kp_o, .l2kp_o, .fsclr_o, .frsbu_o, .fillbu_o,
    .run_o(run), .fer_o, .fer_pulse_o, .l1_ff_o, .clk_local_o
  );

  stc_slow_card u_slow (
    .clk, .rst, .ctc_irq_i, .l2kp_ff_i(l2kp_o), .l1kp_i(l1kp_o), .l2kp_i(l2kp_o),
    .sc_gate_i(run), .sc_reset_i, .info_i(ctc_info_i),
    .irq_o, .iack_i, .iack_level_i, .vector_o, .vector_valid_o,
    .reg_we_i(stc_we_i && stc_sel_i == 2'd1), .reg_addr_i(stc_addr_i[2:0]),
    .reg_wdata_i(stc_wdata_i), .reg_rdata_o(rd_slow), .led_o(info_led_o)
  );

  for (genvar f = 0; f < 2; f++) begin : g_fan
    stc_fanout_card u_fan (
      .clk, .rst, .bc_i(bc),
      .out_i({run, fsclr_o, l2kp_o, l1kp_o, pen_o, hck}),
      .nim_i(nim_art_i), .inward_i(inward_i[f]),
      .and_i(f == 0 ? fan_and[1] : 1'b1),
      .reg_we_i(stc_we_i && stc_sel_i == 2'(2 + f)), .reg_addr_i(stc_addr_i[2:0]),
      .reg_wdata_i(stc_wdata_i), .reg_rdata_o(rd_fan[f]),
      .port_o(fan_port[f]), .nim_o(fan_nim_o[f]), .gclk_o(fan_gclk[f]),
      .inward_o(fan_inward_o[f]), .and_o(fan_and[f])
    );
  end
  assign gclk_o = fan_gclk[0];

  always_comb begin
    unique case (stc_sel_i)
      2'd0: stc_rdata_o = rd_fast;
      2'd1: stc_rdata_o = rd_slow;
      2'd2: stc_rdata_o = rd_fan[0];
      default: stc_rdata_o = rd_fan[1];
    endcase
  end

  // ---------------- trigger crates ----------------
  logic [SECTORS-1:0][31:0] link;
  logic [SECTORS-1:0]       tc_pen;
  logic [SECTORS-1:0][31:0] tc_data;
  logic [SECTORS-1:0]       tc_oe, tc_dtack_n;
  logic [7:0][31:0]         cc_data;
  logic [7:0]               cc_oe, cc_dtack_n;
  logic [7:0]               cc_pen, cc_greset;

  for (genvar c = 0; c < 8; c++) begin : g_cc
    localparam int unsigned CR = c / 2;
    control_card u_cc (
      .clk, .rst, .phase_i(phase),
      .pen_i(fan_port[c / 4][c % 4][1]), .greset_i,
      .layer_clk_i(layer_clk_i[c]),
      .active_i({active_i[2*c + 1], active_i[2*c]}),
      .base_i(8'h30 + 8'(c % 2)),
      .as_n_i(vme_as_n_i[CR]), .ds_n_i(vme_ds_n_i[CR]), .write_n_i(vme_write_n_i[CR]),
      .lword_n_i(vme_lword_n_i[CR]), .am_i(vme_am_i[CR]), .addr_i(vme_addr_i[CR]),
      .data_i(vme_data_i[CR]), .data_o(cc_data[c]), .data_oe_o(cc_oe[c]),
      .dtack_n_o(cc_dtack_n[c]),
      .pen_o(cc_pen[c]), .greset_o(cc_greset[c]),
      .hck_layer_o(hck_layer_o[c]), .cosmic_o(cosmic_o[c])
    );
  end

  for (genvar s = 0; s < SECTORS; s++) begin : g_tc
    localparam int unsigned CR = s / 4;
    assign tc_pen[s] = cc_pen[s / 2];
    trigger_card #(.DEPTH(DEPTH), .LATENCY(LATENCY)) u_tc (
      .clk, .rst(rst || cc_greset[s / 2]), .phase_i(phase),
      .line_i(line_i[s]), .pen_i(tc_pen[s]),
      .base_i(8'h20 + 8'(s % 4)),
      .as_n_i(vme_as_n_i[CR]), .ds_n_i(vme_ds_n_i[CR]), .write_n_i(vme_write_n_i[CR]),
      .lword_n_i(vme_lword_n_i[CR]), .am_i(vme_am_i[CR]), .addr_i(vme_addr_i[CR]),
      .data_i(vme_data_i[CR]), .data_o(tc_data[s]), .data_oe_o(tc_oe[s]),
      .dtack_n_o(tc_dtack_n[s]),
      .link_o(link[s]), .ctrl_o(card_ctrl_o[s])
    );
  end

  // wired-OR VME buses: open-collector DTACK*, data from whoever drives
  always_comb begin
    for (int cr = 0; cr < 4; cr++) begin
      vme_data_o[cr]    = '0;
      vme_dtack_n_o[cr] = 1'b1;
      for (int k = 0; k < 4; k++) begin
        if (tc_oe[4*cr + k]) vme_data_o[cr] |= tc_data[4*cr + k];
        vme_dtack_n_o[cr] &= tc_dtack_n[4*cr + k];
      end
      for (int k = 0; k < 2; k++) begin
        if (cc_oe[2*cr + k]) vme_data_o[cr] |= cc_data[2*cr + k];
        vme_dtack_n_o[cr] &= cc_dtack_n[2*cr + k];
      end
    end
  end

  // ---------------- sum cards ----------------
  logic [1:0][BINS*W_PRESUM-1:0] pre_hist;
  logic [1:0]                    pre_valid;

  for (genvar p = 0; p < 2; p++) begin : g_pre
    presum_card u_pre (
      .clk, .rst, .phase_i(phase), .link_i(link[8*p +: 8]),
      .hist_o(pre_hist[p]), .valid_o(pre_valid[p])
    );
  end

  mainsum_card u_main (
    .clk, .rst, .valid_i(pre_valid[0]), .hist0_i(pre_hist[0]), .hist1_i(pre_hist[1]),
    .hist_o(main_hist_o), .valid_o(main_valid_o)
  );

  // ---------------- data reduction ----------------
  rle_encoder #(.W0(RLE_W0), .W1(RLE_W1)) u_rle (
    .clk, .rst, .start_i(rle_start_i), .valid_i(rle_valid_i), .bit_i(rle_bit_i),
    .last_i(rle_last_i), .ready_o(rle_ready_o), .code_o(rle_code_o),
    .code_one_o(rle_code_one_o), .code_valid_o(rle_code_valid_o),
    .bits_o(rle_bits_o), .done_o(rle_done_o)
  );

  zero_suppress_encoder #(.N(ZS_N)) u_zs (
    .clk, .rst, .start_i(zs_start_i), .block_i(zs_block_i), .busy_o(zs_busy_o),
    .pos_o(zs_pos_o), .pos_valid_o(zs_pos_valid_o), .count_o(zs_count_o),
    .bits_o(zs_bits_o), .done_o(zs_done_o)
  );
endmodule
