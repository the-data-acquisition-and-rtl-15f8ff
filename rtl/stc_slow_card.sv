// stc_slow_card -- Slow Card of the Subsystem Trigger Controller.
//
// Interrupt logic: eight identical interrupt channels, each a flip-flop set by
// a request from the CTC (rising edge of ctc_irq_i) or by a register write.
// Together with the Fast Card's L2 Keep flip-flop (channel 8) they are ANDed
// with the mask register and routed, as by the card's wire-wrap matrix, to
// one of three eight-input priority encoders (ROUTE, 2 bits per channel:
// 0 = not connected, 1..3 = encoder; a channel enters its encoder at input
// channel mod 8, higher input = higher priority). The OR of an encoder's
// inputs drives the VME IRQ line ENC_LEVEL of that encoder. In the VME
// interrupt-acknowledge cycle for that level the card places the status
// byte {vector base[4:0], encoder input} on the data lines (vector_o,
// vector_valid_o) and clears the acknowledged channel's flip-flop
// (release on acknowledge; channel 8 is cleared by the Fast Card).
// Scalers: two 32-bit synchronous gated scalers counting L1 Keeps and L2
// Keeps (rising edges) while sc_gate_i is high, with a common reset.
// Information bits: four bits from the CTC, readable and shown on LEDs.
//
// Registers (register bus of the STC crate): 0 mask [8:0], 1 vector base
// [4:0], 2 write 1s to set interrupt flip-flops [7:0] / read them, 3 write 1s
// to clear them, 4 L1 Keep scaler, 5 L2 Keep scaler, 6 information bits.
// Routing as a parameter, the vector format, release-on-acknowledge and the
// default levels are this design's choices; the channel counts, the three
// encoders and the scaler widths follow the document.
// Register writes use only the low bits of the data word; the rest is ignored.
module stc_slow_card #(
  parameter logic [17:0]     ROUTE     = {2'd2, {8{2'd1}}},  // ch8 -> enc 2, ch0..7 -> enc 1
  parameter logic [2:0][2:0] ENC_LEVEL = {3'd5, 3'd4, 3'd3}  // IRQ levels of encoders 3,2,1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  ctc_irq_i,
  input  logic        l2kp_ff_i,     // Fast Card L2 Keep flip-flop
  input  logic        l1kp_i,
  input  logic        l2kp_i,
  input  logic        sc_gate_i,
  input  logic        sc_reset_i,
  input  logic [3:0]  info_i,
  // VME interrupt
  output logic [7:1]  irq_o,         // 1 = IRQn asserted
  input  logic        iack_i,        // acknowledge cycle, one-cycle pulse
  input  logic [2:0]  iack_level_i,
  output logic [7:0]  vector_o,
  output logic        vector_valid_o,
  // register bus
  input  logic        reg_we_i,
  input  logic [2:0]  reg_addr_i,
  input  logic [31:0] reg_wdata_i,
  output logic [31:0] reg_rdata_o,
  output logic [3:0]  led_o
);
  logic [7:0]  irq_ff, ctc_q;
  logic [8:0]  mask;
  logic [4:0]  vbase;
  logic [31:0] l1_sc, l2_sc;
  logic        l1_q, l2_q;
  logic [3:0]  info_q;
  logic [8:0]  src;
  logic [2:0][7:0] enc_in;

  always_comb begin
    src    = {l2kp_ff_i, irq_ff} & mask;
    enc_in = '0;
    for (int c = 0; c < 9; c++)
      for (int e = 0; e < 3; e++)
        if (ROUTE[2*c +: 2] == 2'(e + 1)) enc_in[e][c % 8] |= src[c];
    irq_o = '0;
    for (int e = 0; e < 3; e++)
      if (|enc_in[e] && ENC_LEVEL[e] != 0) irq_o[ENC_LEVEL[e]] = 1'b1;
  end

  // highest active input of an encoder
  function automatic logic [2:0] top(input logic [7:0] v);
    logic [2:0] r;
    r = '0;
    for (int i = 0; i < 8; i++) if (v[i]) r = 3'(i);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      irq_ff <= '0; ctc_q <= '0; mask <= '0; vbase <= '0;
      l1_sc <= '0; l2_sc <= '0; l1_q <= 1'b0; l2_q <= 1'b0; info_q <= '0;
      vector_o <= '0; vector_valid_o <= 1'b0;
    end else begin
      ctc_q  <= ctc_irq_i;
      info_q <= info_i;
      irq_ff <= irq_ff | (ctc_irq_i & ~ctc_q);
      if (reg_we_i) unique case (reg_addr_i)
        3'd0: mask  <= reg_wdata_i[8:0];
        3'd1: vbase <= reg_wdata_i[4:0];
        3'd2: irq_ff <= irq_ff | reg_wdata_i[7:0] | (ctc_irq_i & ~ctc_q);
        3'd3: irq_ff <= (irq_ff & ~reg_wdata_i[7:0]) | (ctc_irq_i & ~ctc_q);
        default: ;
      endcase
      vector_valid_o <= 1'b0;
      if (iack_i) begin
        for (int e = 0; e < 3; e++) begin
          if (ENC_LEVEL[e] == iack_level_i && |enc_in[e]) begin
            automatic logic [2:0] t = top(enc_in[e]);
            vector_o       <= {vbase, t};
            vector_valid_o <= 1'b1;
            for (int c = 0; c < 8; c++)
              if (ROUTE[2*c +: 2] == 2'(e + 1) && 3'(c) == t) irq_ff[c] <= 1'b0;
          end
        end
      end
      // gated scalers
      l1_q <= l1kp_i;
      l2_q <= l2kp_i;
      if (sc_reset_i) begin
        l1_sc <= '0;
        l2_sc <= '0;
      end else if (sc_gate_i) begin
        if (l1kp_i && !l1_q) l1_sc <= l1_sc + 1'b1;
        if (l2kp_i && !l2_q) l2_sc <= l2_sc + 1'b1;
      end
    end
  end

  assign led_o = info_q;

  always_comb begin
    unique case (reg_addr_i)
      3'd0:    reg_rdata_o = 32'(mask);
      3'd1:    reg_rdata_o = 32'(vbase);
      3'd2:    reg_rdata_o = 32'(irq_ff);
      3'd4:    reg_rdata_o = l1_sc;
      3'd5:    reg_rdata_o = l2_sc;
      3'd6:    reg_rdata_o = 32'(info_q);
      default: reg_rdata_o = 32'h0;
    endcase
  end
endmodule
