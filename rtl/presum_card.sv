// presum_card -- pre-sum card: receives the sector histograms of eight
// sectors in phi (eight four-times multiplexed 32-bit links from the trigger
// cards), demultiplexes them (hist_link_rx) and adds them bin by bin into a
// histogram of 15 bins x 10 bits, which goes over the 150-bit parallel link
// to the main-sum card. Two pre-sum cards serve sectors 0-7 and 8-15.
//
// Timing: all links share the bunch-crossing phase. The sum is registered
// one cycle after the links' frames complete; valid_o marks it. Since the
// links share the phase, the valid flag of link 0 stands for all; the
// other receivers' valid outputs are left unused.
// The VME controller of the real card (for programming and registers of its
// FPGA, whose contents the document does not give) is not modelled.
module presum_card
  import cip_pkg::*;
#(
  parameter int unsigned N_IN = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [1:0]                phase_i,
  input  logic [N_IN-1:0][31:0]     link_i,
  output logic [BINS*W_PRESUM-1:0]  hist_o,
  output logic                      valid_o
);
  logic [BINS*W_CARD-1:0] h [N_IN];
  logic [N_IN-1:0]        v;

  for (genvar i = 0; i < N_IN; i++) begin : g_rx
    hist_link_rx u_rx (.clk, .rst, .phase_i, .link_i(link_i[i]), .hist_o(h[i]), .valid_o(v[i]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= v[0];
      if (v[0]) begin
        for (int b = 0; b < int'(BINS); b++) begin
          logic [W_PRESUM-1:0] acc;
          acc = '0;
          for (int i = 0; i < int'(N_IN); i++) acc += W_PRESUM'(h[i][W_CARD*b +: W_CARD]);
          hist_o[W_PRESUM*b +: W_PRESUM] <= acc;
        end
      end
    end
  end
endmodule
