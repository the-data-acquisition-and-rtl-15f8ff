// control_card -- CIP2000 control card (two per trigger crate, each serving
// two sectors in phi).
//
// * Distributes Pipeline Enable and Global Reset from the STC fanout to the
//   trigger cards over the backplane. Pipeline Enable is first synchronised
//   to the bunch crossing (sampled at phase 0) and can then be delayed by
//   0..15 fast-clock cycles (register 5).
// * Sends the HERA clock to the chamber electronics of each of the five
//   layers, each with its own delay of 0..15 fast-clock cycles (registers
//   0..4), to adjust the timing of the optical chamber readout. The HERA
//   clock is high in phases 0 and 1 of every bunch crossing.
// * Watches the clock that each layer's optical readout returns: for every
//   layer the phase (0..3) in which its rising edge was last seen, plus a
//   "seen" bit, is kept in the phase register (register 6, read only,
//   layer l in bits [4l +: 3] = {seen, phase}). The edge is detected after a
//   two-stage synchroniser; the stored phase is corrected for those two
//   clocks, so it is the phase of the clock cycle in which the input rose.
// * Cosmic trigger: for each of its two sectors, cosmic_o is set for one
//   bunch crossing when every layer reports at least one active pad (the
//   CIPiX empty-word signals, here active_i = not empty, either half).
//
// All registers are reached over VME through a vme_slave (A23..A16 = base_i,
// A4..A2 = register). The delay steps, register layout and the way phases
// are measured are this design's choices; the document gives the functions.
module control_card
  import cip_pkg::*;
#(
  parameter int unsigned NLAYERS = LAYERS
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [1:0]              phase_i,
  input  logic                    pen_i,
  input  logic                    greset_i,
  input  logic [NLAYERS-1:0]      layer_clk_i,    // returned chamber clocks
  input  logic [1:0][NLAYERS-1:0][1:0] active_i,  // [sector][layer][half]
  input  logic [7:0]              base_i,
  // VME
  input  logic        as_n_i,
  input  logic [1:0]  ds_n_i,
  input  logic        write_n_i,
  input  logic        lword_n_i,
  input  logic [5:0]  am_i,
  input  logic [23:1] addr_i,
  input  logic [31:0] data_i,
  output logic [31:0] data_o,
  output logic        data_oe_o,
  output logic        dtack_n_o,
  // outputs
  output logic                    pen_o,
  output logic                    greset_o,
  output logic [NLAYERS-1:0]      hck_layer_o,
  output logic [1:0]              cosmic_o
);
  lbus_req_t   lreq;
  logic        ack;
  logic [31:0] rdata;
  logic [3:0]  delay [NLAYERS];
  logic [3:0]  pen_delay;
  logic [15:0] hck_hist, pen_hist;
  logic        pen_sync;
  logic [NLAYERS-1:0] lclk_s1, lclk_s2, lclk_q;
  logic [2:0]  ph_reg [NLAYERS];

  vme_slave u_vme (
    .clk, .rst, .base_i,
    .as_n_i, .ds_n_i, .write_n_i, .lword_n_i, .am_i, .addr_i, .data_i,
    .data_o, .data_oe_o, .dtack_n_o,
    .lreq_o(lreq), .ack_i(ack), .rdata_i(rdata)
  );

  wire hck = (phase_i < 2'd2);

  always_ff @(posedge clk) begin
    if (rst) begin
      hck_hist <= '0;
      pen_hist <= '0;
      pen_sync <= 1'b0;
      greset_o <= 1'b1;
      cosmic_o <= '0;
      lclk_s1  <= '0; lclk_s2 <= '0; lclk_q <= '0;
      for (int l = 0; l < int'(NLAYERS); l++) ph_reg[l] <= '0;
    end else begin
      hck_hist <= {hck_hist[14:0], hck};
      if (phase_i == 2'd0) pen_sync <= pen_i;
      pen_hist <= {pen_hist[14:0], pen_sync};
      greset_o <= greset_i;
      // returned layer clocks: two-stage synchroniser, then edge detection
      lclk_s1 <= layer_clk_i;
      lclk_s2 <= lclk_s1;
      lclk_q  <= lclk_s2;
      for (int l = 0; l < int'(NLAYERS); l++)
        if (lclk_s2[l] && !lclk_q[l]) ph_reg[l] <= {1'b1, phase_i - 2'd2};
      // cosmic trigger, evaluated once per bunch crossing
      if (phase_i == 2'd3) begin
        for (int s = 0; s < 2; s++) begin
          logic all_layers;
          all_layers = 1'b1;
          for (int l = 0; l < int'(NLAYERS); l++) all_layers &= |active_i[s][l];
          cosmic_o[s] <= all_layers;
        end
      end
    end
  end

  always_comb begin
    for (int l = 0; l < int'(NLAYERS); l++)
      hck_layer_o[l] = (delay[l] == 0) ? hck : hck_hist[delay[l] - 1];
    pen_o = (pen_delay == 0) ? pen_sync : pen_hist[pen_delay - 1];
  end

  // register access, answered one cycle after the request
  always_ff @(posedge clk) begin
    if (rst) begin
      ack       <= 1'b0;
      rdata     <= '0;
      pen_delay <= '0;
      for (int l = 0; l < int'(NLAYERS); l++) delay[l] <= '0;
    end else begin
      ack <= lreq.req;
      if (lreq.req) begin
        automatic int r = int'(lreq.addr[4:2]);
        rdata <= '0;
        if (r < int'(NLAYERS)) begin
          rdata <= 32'(delay[r]);
          if (lreq.we) delay[r] <= lreq.wdata[3:0];
        end else if (r == 5) begin
          rdata <= 32'(pen_delay);
          if (lreq.we) pen_delay <= lreq.wdata[3:0];
        end else if (r == 6) begin
          for (int l = 0; l < int'(NLAYERS); l++) rdata[4*l +: 3] <= ph_reg[l];
        end
      end
    end
  end
endmodule
