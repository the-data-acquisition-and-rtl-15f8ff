// chamber_demux -- four-times demultiplexer of the chamber data of one sector
// in phi, as done at the input of each trigger-card FPGA.
//
// Each CIPiX chip serves 60 pads of one layer and half sector and sends them
// over 15 lines, four times multiplexed: in fast-clock phase k of a bunch
// crossing, line j of a chip carries pad 4*j+k (four adjacent pads form one
// group, as the document describes). The 150 lines of a sector are numbered
// chip by chip, chip c = 2*layer + half, line = 15*c + j; this numbering is
// this design's own choice.
//
// Timing: phase_i counts 0..3 in every bunch crossing. The bits arriving in
// phases 0..3 are collected and, with the phase-3 sample, the complete
// 600-bit pattern is registered on pattern_o; valid_o pulses for one cycle
// at the same edge. Latency: one cycle after the phase-3 sample.
// pattern_o bit index = 120*layer + pad, pad 0..119 counted from the -z end.
module chamber_demux
  import cip_pkg::*;
#(
  parameter int unsigned NLAYERS = LAYERS
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [1:0]                  phase_i,
  input  logic [NLAYERS*2*HALF_LINES-1:0] line_i,
  output logic [NLAYERS*PADS-1:0]     pattern_o,
  output logic                        valid_o
);
  localparam int unsigned NL = NLAYERS * 2 * HALF_LINES;

  logic [2:0] shadow [NL];   // phases 0..2 of the current bunch crossing

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_o   <= 1'b0;
      pattern_o <= '0;
      for (int l = 0; l < NL; l++) shadow[l] <= '0;
    end else begin
      valid_o <= (phase_i == 2'd3);
      for (int l = 0; l < NL; l++) begin
        if (phase_i != 2'd3) shadow[l][phase_i] <= line_i[l];
      end
      if (phase_i == 2'd3) begin
        for (int l = 0; l < NL; l++) begin
          for (int k = 0; k < 4; k++) begin
            // chip c = l / 15 -> layer c/2, half c%2; pad within layer
            pattern_o[(l / (2*HALF_LINES)) * PADS
                      + ((l / HALF_LINES) % 2) * HALF_PADS
                      + 4 * (l % HALF_LINES) + k]
              <= (k == 3) ? line_i[l] : shadow[l][k];
          end
        end
      end
    end
  end
endmodule
