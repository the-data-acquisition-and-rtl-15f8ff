// stc_fanout_card -- Fanout Card of the Subsystem Trigger Controller.
//
// Takes six outward signals (here: 0 HERA clock, 1 Pipeline Enable, 2..5 any
// further signals such as L1 Keep, L2 Keep, Fast Clear, Run), lets each be
// disabled or delayed by 0..15 fast-clock cycles, and fans the result out
// fivefold to identical cable ports and to front NIM outputs. Pipeline
// Enable additionally passes through
//   * the afterrun logic, which holds its true->false transition back by a
//     programmable number of clock phases (fast-clock cycles), and
//   * the artificial-signal logic, which, when selected, replaces Pipeline
//     Enable by a pulse of programmable length in bunch crossings, started
//     by the NIM input or a register write and aligned to the bunch crossing.
// The gated-clock logic outputs the HERA clock only while Pipeline Enable is
// high (gclk_o). Inward direction: each cable port brings two inward
// signals, which are shown on the backplane and in a register and are ANDed
// (after a mask, masked inputs count as true) with the AND of the previous
// card (and_i), so that the AND extends over several cards.
//
// Registers (STC register bus): 0 control [5:0] signal enables, [8] select
// artificial PEn, [9] start artificial pulse (write 1); 1 delays, signal s in
// [4s +: 4]; 2 afterrun length; 3 artificial pulse length; 4 inward mask
// [9:0] (1 = used); 5 inward signals (read only).
// Delay steps, the meaning of signals 2..5, the register layout and the
// reading of "clock phases" as fast-clock cycles are this design's choices.
// The connection test logic of the real card is not modelled.
module stc_fanout_card (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc_i,
  input  logic [5:0]  out_i,
  input  logic        nim_i,
  input  logic [4:0][1:0] inward_i,
  input  logic        and_i,
  // register bus
  input  logic        reg_we_i,
  input  logic [2:0]  reg_addr_i,
  input  logic [31:0] reg_wdata_i,
  output logic [31:0] reg_rdata_o,
  // outputs
  output logic [4:0][5:0] port_o,
  output logic [5:0]  nim_o,
  output logic        gclk_o,
  output logic [9:0]  inward_o,
  output logic        and_o
);
  logic [31:0] ctrl;
  logic [23:0] dly;
  logic [15:0] ar_len, art_len, ar_cnt, art_cnt;
  logic [9:0]  in_mask;
  logic [15:0] hist [6];
  logic [5:0]  delayed, sig;
  logic        ar_active, art_pend, art_active;

  always_comb begin
    for (int s = 0; s < 6; s++)
      delayed[s] = (dly[4*s +: 4] == 0) ? out_i[s] : hist[s][dly[4*s +: 4] - 1];
  end

  wire bus_art = reg_we_i && reg_addr_i == 3'd0 && reg_wdata_i[9];

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl <= 32'h0000_003F; dly <= '0; ar_len <= '0; art_len <= 16'd1; in_mask <= '0;
      for (int s = 0; s < 6; s++) hist[s] <= '0;
      ar_cnt <= '1;
      art_pend <= 1'b0; art_active <= 1'b0; art_cnt <= '0;
    end else begin
      if (reg_we_i) unique case (reg_addr_i)
        3'd0: ctrl    <= {reg_wdata_i[31:10], 1'b0, reg_wdata_i[8:0]};
        3'd1: dly     <= reg_wdata_i[23:0];
        3'd2: ar_len  <= reg_wdata_i[15:0];
        3'd3: art_len <= reg_wdata_i[15:0];
        3'd4: in_mask <= reg_wdata_i[9:0];
        default: ;
      endcase
      for (int s = 0; s < 6; s++) hist[s] <= {hist[s][14:0], out_i[s]};
      // afterrun: clocks since PEn was last high (saturating)
      if (delayed[1]) ar_cnt <= '0;
      else if (ar_cnt != '1) ar_cnt <= ar_cnt + 1'b1;
      // artificial PEn pulse, synchronised to the bunch crossing
      if (nim_i || bus_art) art_pend <= 1'b1;
      if (bc_i) begin
        if (art_pend && !art_active) begin
          art_pend   <= 1'b0;
          art_active <= 1'b1;
          art_cnt    <= 16'd1;
        end else if (art_active) begin
          if (art_cnt >= art_len) art_active <= 1'b0;
          else art_cnt <= art_cnt + 1'b1;
        end
      end
    end
  end

  // PEn is held high for ar_len clocks after its true->false transition
  assign ar_active = !delayed[1] && (ar_cnt < ar_len);

  always_comb begin
    sig    = delayed & ctrl[5:0];
    sig[1] = ctrl[8] ? art_active : ((delayed[1] | ar_active) & ctrl[1]);
    for (int p = 0; p < 5; p++) port_o[p] = sig;
    nim_o  = sig;
    gclk_o = sig[0] & sig[1];
    inward_o = inward_i;
    and_o  = and_i & (&(inward_i | ~in_mask));
  end

  always_comb begin
    unique case (reg_addr_i)
      3'd0:    reg_rdata_o = ctrl;
      3'd1:    reg_rdata_o = 32'(dly);
      3'd2:    reg_rdata_o = 32'(ar_len);
      3'd3:    reg_rdata_o = 32'(art_len);
      3'd4:    reg_rdata_o = 32'(in_mask);
      3'd5:    reg_rdata_o = 32'(inward_i);
      default: reg_rdata_o = 32'h0;
    endcase
  end
endmodule
