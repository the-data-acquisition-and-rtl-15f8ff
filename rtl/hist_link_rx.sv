// hist_link_rx -- receiver of a four-times multiplexed 32-bit histogram link
// (see hist_link_tx). Words arriving in phases 0..2 are held; with the
// phase-3 word the 128-bit frame is complete and its lower BINS*W bits are
// registered on hist_o, valid_o pulsing for one cycle. Latency from the
// transmitter's capture: one bunch crossing plus one cycle.
module hist_link_rx
  import cip_pkg::*;
#(
  parameter int unsigned W = W_CARD
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [1:0]         phase_i,
  input  logic [31:0]        link_i,
  output logic [BINS*W-1:0]  hist_o,
  output logic               valid_o
);
  localparam int unsigned HW = BINS * W;
  logic [95:0] shadow;

  always_ff @(posedge clk) begin
    if (rst) begin
      shadow  <= '0;
      hist_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= (phase_i == 2'd3);
      if (phase_i != 2'd3) shadow[32*phase_i +: 32] <= link_i;
      else hist_o <= HW'({link_i, shadow});
    end
  end
endmodule
