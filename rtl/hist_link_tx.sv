// hist_link_tx -- transmitter of a sector histogram from trigger-card FPGA 0
// to the pre-sum card: 15 bins x 7 bits (105 bits) sent four times
// multiplexed over a 32-bit link within one bunch crossing, as the document
// describes (on the real card the 32 lines are LVDS pairs in a SCSI cable).
//
// At the end of each bunch crossing (phase_i = 3) hist_i is captured in a
// 128-bit frame (upper 23 bits zero). During phases 0..3 of the next bunch
// crossing link_o carries frame word 0..3, word k = frame[32k +: 32]. The
// word order and framing by the common clock phase are this design's choice.
module hist_link_tx
  import cip_pkg::*;
#(
  parameter int unsigned W = W_CARD
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [1:0]         phase_i,
  input  logic [BINS*W-1:0]  hist_i,
  output logic [31:0]        link_o
);
  logic [127:0] frame;

  always_ff @(posedge clk) begin
    if (rst) frame <= '0;
    else if (phase_i == 2'd3) frame <= 128'(hist_i);
  end

  assign link_o = frame[32*phase_i +: 32];

  initial assert (BINS * W <= 128) else $error("histogram does not fit four link words");
endmodule
