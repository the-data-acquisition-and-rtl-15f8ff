// track_finder -- hit-list generation of the CIP2000 tracking algorithm for
// the central pads handled by one trigger FPGA.
//
// For every central pad (a pad of the middle layer) the local environment is
// the 15 pads around the same pad number in each of the five layers. A track
// from z-vertex bin b crosses layer l at pad  centre + OFFSET(l,b). Thanks to
// the chamber's projective geometry this offset pattern is the same for all
// central pads, so every pad uses one table. A track from bin b is recorded
// in the hit list when at least MIN_LAYERS of the five layers have a hit at
// the pattern's pads. Pads that fall off the end of the chamber count as
// empty.
//
// The document gives the principle (bit-pattern comparison in a local
// environment, one result per central pad and bin) but not the patterns. The
// patterns used here are this design's own: OFFSET(l,b) = ((l-2)*(b-7))/2
// (integer division toward zero), so bin 7 is a straight radial track and the
// outer bins lean up to +-7 pads in the innermost and outermost layers.
// The coincidence requirement MIN_LAYERS (default: all five) is also a choice.
//
// Interface: pattern_i is the 600-bit sector pattern (bit 120*layer + pad).
// HALF selects central pads 0..59 (FPGA 0) or 60..119 (FPGA 1). hits_o bit
// CENTRAL*bin + k belongs to central pad 60*HALF+k. Registered, latency one
// cycle, valid_o follows valid_i.
module track_finder
  import cip_pkg::*;
#(
  parameter int unsigned HALF       = 0,
  parameter int unsigned NBINS      = BINS,
  parameter int unsigned CENTRAL    = HALF_PADS,
  parameter int unsigned MIN_LAYERS = LAYERS
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       valid_i,
  input  logic [LAYERS*PADS-1:0]     pattern_i,
  output logic [NBINS*CENTRAL-1:0]   hits_o,
  output logic                       valid_o
);
  // Pad offset of the track from bin b in layer l, relative to the central pad.
  function automatic int offset(int l, int b);
    return ((l - int'(MID_LAYER)) * (b - int'(NBINS / 2))) / 2;
  endfunction

  logic [NBINS*CENTRAL-1:0] hits;

  // One coincidence per central pad and bin, built as a generate array so
  // that every pad index is a constant.
  for (genvar b = 0; b < NBINS; b++) begin : g_bin
    for (genvar k = 0; k < CENTRAL; k++) begin : g_pad
      logic [LAYERS-1:0] m;
      for (genvar l = 0; l < LAYERS; l++) begin : g_layer
        localparam int P = int'(HALF * CENTRAL) + k + offset(l, b);
        if (P >= 0 && P < int'(PADS)) begin : g_on
          assign m[l] = pattern_i[l*PADS + P];
        end else begin : g_off
          assign m[l] = 1'b0;
        end
      end
      assign hits[CENTRAL*b + k] = ($countones(m) >= MIN_LAYERS);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hits_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) hits_o <= hits;
    end
  end
endmodule
