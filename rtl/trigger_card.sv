// trigger_card -- CIP2000 trigger card for one sector in phi.
//
// Two trigger FPGAs (trigger_fpga, HALF 0 and 1) receive the same 150
// multiplexed chamber lines from the backplane. Each builds the local
// histogram of its half sector (15 bins x 6 bits); FPGA 1 passes its 90 bits
// to FPGA 0, which adds both into the sector histogram of 15 bins x 7 bits
// and sends it four times multiplexed over the 32-bit link to the pre-sum
// card (hist_link_tx). A VME controller (vme_slave) gives the CPU access to
// the readout registers and the mode/remote registers of both FPGAs and to
// the controller's own registers.
//
// Address decoding of A15..A2 (from the document's figure of the VME
// resources; which APEX-control bit selects what is this design's choice):
//   A15 = 1: controller registers, A3..A2 select:
//            0 control register (read/write, drives ctrl_o; on the real card
//              it governs EEPROM and FPGA programming, not modelled here),
//            1 status (read only): [2:0] FPGA 0 state, [6:4] FPGA 1 state.
//   A15 = 0: A14 selects the FPGA, A13 = 0 its readout register,
//            A13 = 1 its mode (word 0) and remote (word 1) register,
//            A7..A2 the word.
// A local access is answered one cycle after the request.
//
// Timing: the sector histogram of a bunch crossing leaves on link_o in the
// bunch crossing after the one in which its last chamber phase arrived.
// Both FPGAs run in lock step, so only FPGA 0's histogram-valid flag is used.
module trigger_card
  import cip_pkg::*;
#(
  parameter int unsigned DEPTH   = 32,
  parameter int unsigned LATENCY = 24
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [1:0]        phase_i,
  input  logic [LINES-1:0]  line_i,
  input  logic              pen_i,
  input  logic [7:0]        base_i,
  // VME
  input  logic              as_n_i,
  input  logic [1:0]        ds_n_i,
  input  logic              write_n_i,
  input  logic              lword_n_i,
  input  logic [5:0]        am_i,
  input  logic [23:1]       addr_i,
  input  logic [31:0]       data_i,
  output logic [31:0]       data_o,
  output logic              data_oe_o,
  output logic              dtack_n_o,
  // histogram link to the pre-sum card
  output logic [31:0]       link_o,
  output logic [31:0]       ctrl_o
);
  lbus_req_t lreq;
  logic        ack;
  logic [31:0] rdata;
  logic [31:0] fpga_rdata [2];
  logic [BINS*W_FPGA-1:0] lhist [2];
  logic        lvalid [2];
  tc_state_e   fstate [2];
  logic [BINS*W_CARD-1:0] sector_hist;

  vme_slave u_vme (
    .clk, .rst, .base_i,
    .as_n_i, .ds_n_i, .write_n_i, .lword_n_i, .am_i, .addr_i, .data_i,
    .data_o, .data_oe_o, .dtack_n_o,
    .lreq_o(lreq), .ack_i(ack), .rdata_i(rdata)
  );

  for (genvar h = 0; h < 2; h++) begin : g_fpga
    trigger_fpga #(.HALF(h), .DEPTH(DEPTH), .LATENCY(LATENCY)) u_fpga (
      .clk, .rst, .phase_i, .line_i, .pen_i,
      .req_i(lreq.req && !lreq.addr[15] && lreq.addr[14] == 1'(h)),
      .we_i(lreq.we), .reg_sel_i(lreq.addr[13]), .addr_i(lreq.addr[7:2]),
      .wdata_i(lreq.wdata), .rdata_o(fpga_rdata[h]),
      .hist_o(lhist[h]), .hist_valid_o(lvalid[h]), .state_o(fstate[h])
    );
  end

  // FPGA 0: add the two local histograms (6-bit + 6-bit -> 7-bit numbers)
  always_ff @(posedge clk) begin
    if (rst) sector_hist <= '0;
    else if (lvalid[0])
      for (int b = 0; b < int'(BINS); b++)
        sector_hist[W_CARD*b +: W_CARD] <= W_CARD'(lhist[0][W_FPGA*b +: W_FPGA])
                                         + W_CARD'(lhist[1][W_FPGA*b +: W_FPGA]);
  end

  hist_link_tx u_tx (.clk, .rst, .phase_i, .hist_i(sector_hist), .link_o);

  // local-bus answer, one cycle after the request
  always_ff @(posedge clk) begin
    if (rst) begin
      ack    <= 1'b0;
      rdata  <= '0;
      ctrl_o <= '0;
    end else begin
      ack <= lreq.req;
      if (lreq.req) begin
        if (lreq.addr[15]) begin
          unique case (lreq.addr[3:2])
            2'd0: begin
              rdata <= ctrl_o;
              if (lreq.we) ctrl_o <= lreq.wdata;
            end
            2'd1:    rdata <= {25'd0, fstate[1], 1'b0, fstate[0]};
            default: rdata <= 32'h0;
          endcase
        end else begin
          rdata <= fpga_rdata[lreq.addr[14]];
        end
      end
    end
  end
endmodule
