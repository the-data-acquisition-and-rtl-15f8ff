// mainsum_card -- main-sum card: adds the two half-chamber histograms from
// the pre-sum cards (15 bins x 10 bits each, 150-bit links) into the main
// z-vertex histogram of the whole chamber, 15 bins x 11 bits.
//
// The main-sum card also builds the 16-bit trigger elements for the central
// trigger, but their definition is left open in the design description, so
// this module delivers the main histogram only. Registered, one cycle of
// latency; valid_o follows valid_i.
module mainsum_card
  import cip_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      valid_i,
  input  logic [BINS*W_PRESUM-1:0]  hist0_i,
  input  logic [BINS*W_PRESUM-1:0]  hist1_i,
  output logic [BINS*W_MAIN-1:0]    hist_o,
  output logic                      valid_o
);
  always_ff @(posedge clk) begin
    if (rst) begin
      hist_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i)
        for (int b = 0; b < int'(BINS); b++)
          hist_o[W_MAIN*b +: W_MAIN] <= W_MAIN'(hist0_i[W_PRESUM*b +: W_PRESUM])
                                      + W_MAIN'(hist1_i[W_PRESUM*b +: W_PRESUM]);
    end
  end
endmodule
