// stc_fast_card -- Fast Card of the Subsystem Trigger Controller (STC).
//
// In mode 0 (submissive) and mode 1 (data autonomous) the card passes the
// fast outward signals of the central trigger (CTC) to the STC backplane:
// Pipeline Enable (PEn), L1 Active, L1 Keep, L2 Keep, Fast Clear, First
// Bunch, Filled Bunch and Run. In modes 2 to 4 it runs the trigger cycle
// itself:
//   * L1 Keep comes from the CTC (mode 2) or from the local L1 logic (modes
//     3, 4): three flip-flops -- detector trigger 0 (unscaled), detector
//     trigger 1 (scaled down by a programmable factor) and the
//     auto-synchronising test trigger (pulse input or bus trigger) -- set
//     once per bunch crossing when their trigger is present and the gate is
//     open (L1 Active, Run, and Filled Bunch if selected).
//   * L1 Keep drops PEn and L1 Active. A programmable number of HERA clock
//     cycles later the card senses the level of an external L2 decider (or a
//     forced decision from control bits) and takes either the L2 Reject turn
//     or the L2 Keep turn.
//   * L2 Keep raises L2 Keep and waits for FER (Front End Ready) to return.
//   * Restart logic: after L2 Reject, or when FER becomes true again, Fast
//     Clear is sent for one bunch crossing, clearing L1 Keep and L2 Keep;
//     PEn rises one bunch crossing after Fast Clear and L1 Active rises
//     L1ATV_DELAY (default 145) bunch crossings after Fast Clear.
// FER logic: FER is either the card's flip-flop (mode bit 0), which drops on
// L2 Keep and comes back a programmable number of HERA clock cycles later, or
// an external level (mode bit 1). A one-BC pulse marks every false->true
// change of FER and resets the local L1 flip-flops.
// Scalers: 8-bit bunch scaler (bunch number, cleared by First Bunch), 32-bit
// revolution scaler (counts First Bunch), 40-bit all-crossing scaler and
// 40-bit scaler of crossings during L1 Active. They count on while read.
// In mode 4 clk_local_o selects the card's quartz oscillator for the HERA
// clock; the oscillator itself is outside this logic.
//
// Everything advances on bc_i, one cycle per bunch crossing. Registers (read
// and write on the STC crate's register bus, reg_addr_i):
//   0 control [2:0] mode, [3] FER external, [4] local run, [5] gate with
//     Filled Bunch, [6] force L2 keep, [7] force L2 reject, [8] use the L2
//     decider input, [9] bus test trigger (write 1), [12:10] enables of the
//     three local triggers
//   1 L2 sense delay, 2 FER delay, 3 L1 Active delay, 4 down-scale factor of
//     detector trigger 1 (0 or 1 = every event)
//   5 bunch scaler, 6 revolution scaler, 7/8 all-crossing scaler low/high,
//   9/10 L1-Active-crossing scaler low/high, 11 status
// The register layout and the machine-signal handling in the autonomous
// modes (First/Filled Bunch are always taken from the CTC) are this design's
// choices; the mode numbering, the signal sequence, the 145 BC and the
// scaler widths follow the document.
module stc_fast_card
  import cip_pkg::*;
#(
  parameter logic [15:0] L1ATV_DELAY = 16'd145
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc_i,
  // outward fast signals from the CTC
  input  logic        ctc_pen_i,
  input  logic        ctc_l1atv_i,
  input  logic        ctc_l1kp_i,
  input  logic        ctc_l2kp_i,
  input  logic        ctc_fsclr_i,
  input  logic        ctc_frsbu_i,
  input  logic        ctc_fillbu_i,
  input  logic        ctc_run_i,
  // local trigger sources
  input  logic [1:0]  det_trig_i,
  input  logic        test_trig_i,
  input  logic        l2_decider_i,
  input  logic        fer_ext_i,
  // register bus
  input  logic        reg_we_i,
  input  logic [3:0]  reg_addr_i,
  input  logic [31:0] reg_wdata_i,
  output logic [31:0] reg_rdata_o,
  // STC backplane
  output logic        pen_o,
  output logic        l1atv_o,
  output logic        l1kp_o,
  output logic        l2kp_o,
  output logic        fsclr_o,
  output logic        frsbu_o,
  output logic        fillbu_o,
  output logic        run_o,
  output logic        fer_o,
  output logic        fer_pulse_o,
  output logic [2:0]  l1_ff_o,
  output logic        clk_local_o
);
  typedef enum logic [2:0] {F_READY, F_L1, F_L2KEEP, F_CLEAR} fstate_e;
  fstate_e fst;

  logic [31:0] ctrl;
  logic [15:0] l2_delay, fer_delay, atv_delay, scale;
  logic [15:0] l2_cnt, fer_cnt, atv_cnt, scale_cnt;
  logic [7:0]  bunch_sc;
  logic [31:0] rev_sc;
  logic [39:0] all_sc, atv_sc;
  logic        fer_ff, fer_q, test_pend, l2kp_q;
  logic        loc_pen, loc_l1atv, loc_l1kp, loc_l2kp, loc_fsclr;

  stc_mode_e mode;
  assign mode = stc_mode_e'(ctrl[2:0]);
  wire local_seq = (mode == STC_L2_AUTO) || (mode == STC_TRIG_AUTO) || (mode == STC_CLOCK_AUTO);
  wire local_l1  = (mode == STC_TRIG_AUTO) || (mode == STC_CLOCK_AUTO);

  assign run_o    = local_l1 ? ctrl[4] : ctc_run_i;
  assign frsbu_o  = ctc_frsbu_i;
  assign fillbu_o = ctc_fillbu_i;
  assign pen_o    = local_seq ? loc_pen   : ctc_pen_i;
  assign l1atv_o  = local_seq ? loc_l1atv : ctc_l1atv_i;
  assign l1kp_o   = local_seq ? loc_l1kp  : ctc_l1kp_i;
  assign l2kp_o   = local_seq ? loc_l2kp  : ctc_l2kp_i;
  assign fsclr_o  = local_seq ? loc_fsclr : ctc_fsclr_i;
  assign fer_o    = ctrl[3] ? fer_ext_i : fer_ff;
  assign clk_local_o = (mode == STC_CLOCK_AUTO);

  wire gate   = l1atv_o && run_o && (!ctrl[5] || fillbu_o);
  wire l1_any = |l1_ff_o;
  wire bus_test = reg_we_i && reg_addr_i == 4'd0 && reg_wdata_i[9];

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl      <= '0;
      l2_delay  <= 16'd10;
      fer_delay <= 16'd100;
      atv_delay <= L1ATV_DELAY;
      scale     <= 16'd1;
      fst       <= F_READY;
      loc_pen   <= 1'b1;
      loc_l1atv <= 1'b0;
      loc_l1kp  <= 1'b0;
      loc_l2kp  <= 1'b0;
      loc_fsclr <= 1'b0;
      l2_cnt <= '0; fer_cnt <= '0; atv_cnt <= '0; scale_cnt <= '0;
      bunch_sc <= '0; rev_sc <= '0; all_sc <= '0; atv_sc <= '0;
      fer_ff <= 1'b1; fer_q <= 1'b1; fer_pulse_o <= 1'b0;
      test_pend <= 1'b0; l2kp_q <= 1'b0;
      l1_ff_o <= '0;
    end else begin
      // register writes
      if (reg_we_i) unique case (reg_addr_i)
        4'd0: ctrl      <= {reg_wdata_i[31:10], 1'b0, reg_wdata_i[8:0]};
        4'd1: l2_delay  <= reg_wdata_i[15:0];
        4'd2: fer_delay <= reg_wdata_i[15:0];
        4'd3: atv_delay <= reg_wdata_i[15:0];
        4'd4: scale     <= reg_wdata_i[15:0];
        default: ;
      endcase
      // the test trigger input is asynchronous to the HERA clock: hold it
      if (test_trig_i || bus_test) test_pend <= 1'b1;

      if (bc_i) begin
        // ---- scalers ----
        all_sc <= all_sc + 1'b1;
        if (l1atv_o) atv_sc <= atv_sc + 1'b1;
        if (frsbu_o) begin
          bunch_sc <= '0;
          rev_sc   <= rev_sc + 1'b1;
        end else begin
          bunch_sc <= bunch_sc + 1'b1;
        end

        // ---- local L1 flip-flops ----
        if (loc_fsclr || fer_pulse_o) begin
          l1_ff_o <= '0;
        end else if (gate) begin
          if (ctrl[10] && det_trig_i[0]) l1_ff_o[0] <= 1'b1;
          if (ctrl[11] && det_trig_i[1]) begin
            if (scale_cnt + 1'b1 >= scale) begin
              l1_ff_o[1] <= 1'b1;
              scale_cnt  <= '0;
            end else begin
              scale_cnt <= scale_cnt + 1'b1;
            end
          end
          if (ctrl[12] && test_pend) l1_ff_o[2] <= 1'b1;
        end
        if (test_pend) test_pend <= 1'b0;

        // ---- FER flip-flop ----
        l2kp_q <= l2kp_o;
        if (l2kp_o && !l2kp_q) begin
          fer_ff  <= 1'b0;
          fer_cnt <= '0;
        end else if (!fer_ff) begin
          fer_cnt <= fer_cnt + 1'b1;
          if (fer_cnt + 1'b1 >= fer_delay) fer_ff <= 1'b1;
        end
        fer_q       <= fer_o;
        fer_pulse_o <= fer_o && !fer_q;

        // ---- L1 Active counter after Fast Clear ----
        if (!loc_l1atv && fst != F_L1 && fst != F_L2KEEP && fst != F_CLEAR) begin
          atv_cnt <= atv_cnt + 1'b1;
          if (atv_cnt + 1'b1 >= atv_delay) loc_l1atv <= 1'b1;
        end

        // ---- trigger sequence (modes 2..4) ----
        loc_fsclr <= 1'b0;
        unique case (fst)
          F_READY: begin
            if (local_seq && ((local_l1 && l1_any) || (!local_l1 && ctc_l1kp_i))) begin
              loc_l1kp  <= 1'b1;
              loc_pen   <= 1'b0;
              loc_l1atv <= 1'b0;
              l2_cnt    <= '0;
              fst       <= F_L1;
            end
          end
          F_L1: begin
            l2_cnt <= l2_cnt + 1'b1;
            if (l2_cnt + 1'b1 >= l2_delay) begin
              if (ctrl[6] || (!ctrl[7] && ctrl[8] && l2_decider_i)) begin
                loc_l2kp <= 1'b1;
                fst      <= F_L2KEEP;
              end else begin
                loc_fsclr <= 1'b1;       // L2 Reject
                loc_l1kp  <= 1'b0;
                atv_cnt   <= '0;
                fst       <= F_CLEAR;
              end
            end
          end
          F_L2KEEP: begin
            if (fer_o && !fer_q && !(l2kp_o && !l2kp_q)) begin
              loc_fsclr <= 1'b1;
              loc_l1kp  <= 1'b0;
              loc_l2kp  <= 1'b0;
              atv_cnt   <= '0;
              fst       <= F_CLEAR;
            end
          end
          F_CLEAR: begin
            loc_pen <= 1'b1;             // one BC after Fast Clear
            atv_cnt <= atv_cnt + 1'b1;
            fst     <= F_READY;
          end
          default: fst <= F_READY;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_addr_i)
      4'd0:  reg_rdata_o = ctrl;
      4'd1:  reg_rdata_o = 32'(l2_delay);
      4'd2:  reg_rdata_o = 32'(fer_delay);
      4'd3:  reg_rdata_o = 32'(atv_delay);
      4'd4:  reg_rdata_o = 32'(scale);
      4'd5:  reg_rdata_o = 32'(bunch_sc);
      4'd6:  reg_rdata_o = rev_sc;
      4'd7:  reg_rdata_o = all_sc[31:0];
      4'd8:  reg_rdata_o = 32'(all_sc[39:32]);
      4'd9:  reg_rdata_o = atv_sc[31:0];
      4'd10: reg_rdata_o = 32'(atv_sc[39:32]);
      4'd11: reg_rdata_o = {20'd0, l1_ff_o, fer_o, fsclr_o, l2kp_o, l1kp_o, l1atv_o, pen_o, fst};
      default: reg_rdata_o = 32'h0;
    endcase
  end

  // L1 Keep and Pipeline Enable are never high together in the local cycle.
  assert property (@(posedge clk) disable iff (rst) !(loc_l1kp && loc_pen));
endmodule
