// local_histogram -- adds up the hit lists of the central pads handled by one
// trigger FPGA into a local z-vertex histogram.
//
// hits_i holds one bit per central pad and bin (index CENTRAL*bin + pad): the
// pad's local environment contains a track from that bin. For every bin the
// bits of all central pads are counted. With 60 central pads the counts fit in
// the 6 bits the document gives for the local histogram. The result is
// registered: one cycle of latency, hist_o valid when valid_o is high.
// hist_o packs bin b in bits [W*b +: W].
module local_histogram
  import cip_pkg::*;
#(
  parameter int unsigned NBINS   = BINS,
  parameter int unsigned CENTRAL = HALF_PADS,
  parameter int unsigned W       = W_FPGA
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      valid_i,
  input  logic [NBINS*CENTRAL-1:0]  hits_i,
  output logic [NBINS*W-1:0]        hist_o,
  output logic                      valid_o
);
  logic [NBINS*W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int b = 0; b < NBINS; b++) begin
      logic [W-1:0] acc;
      acc = '0;
      for (int p = 0; p < CENTRAL; p++) acc = acc + W'(hits_i[CENTRAL*b + p]);
      sum[W*b +: W] = acc;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) hist_o <= sum;
    end
  end

  initial assert ((1 << W) > CENTRAL) else $error("histogram width too small");
endmodule
