// trigger_fpga -- one of the two APEX FPGAs of a CIP2000 trigger card.
//
// Both FPGAs receive the full chamber data of their sector in phi (150 lines,
// four times multiplexed). Each one
//   * demultiplexes the lines into the 600-bit sector pattern (chamber_demux),
//   * runs the tracking for its half of the central pads (track_finder,
//     HALF = 0 or 1) and adds the hit lists to a 15-bin local histogram of
//     6-bit numbers (local_histogram),
//   * stores its half-sector data (5 chips x 60 pads) in a pipeline and, on
//     L1 Keep (falling Pipeline Enable), copies the event window into its
//     readout register (event_pipeline),
//   * holds a mode register (state shown to the CPU) and a remote register
//     (commands from the CPU), both reachable over VME.
// Adding the two local histograms and sending the result to the pre-sum card
// is done in FPGA 0; here that is part of trigger_card.
//
// Register interface (one-cycle access from the card's VME controller):
// reg_sel_i = 0 reads readout-register word addr_i (10*event + word);
// reg_sel_i = 1, addr_i 0: mode register (read only)
//     [2:0] state (cip_pkg::tc_state_e), [6:4] events in readout register,
//     [31:16] number of event windows copied since reset;
// reg_sel_i = 1, addr_i 1: remote register
//     [0] run: enable the pipeline, [1] release: writing 1 hands the readout
//     register back (VALID or REJECT -> RUN, self clearing), [6:4] event
//     window size (default 5; the document reads 3 to 5 events).
// The register bit assignments and states are this design's own; the
// document only says that mode and remote registers exist and what they do.
//
// Timing: pattern registered one cycle after phase 3, hit list one cycle
// later, local histogram one more: hist_valid_o pulses 3 cycles after the
// phase-3 sample of each bunch crossing.
module trigger_fpga
  import cip_pkg::*;
#(
  parameter int unsigned HALF    = 0,
  parameter int unsigned DEPTH   = 32,
  parameter int unsigned LATENCY = 24
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [1:0]            phase_i,
  input  logic [LINES-1:0]      line_i,
  input  logic                  pen_i,
  // register access
  input  logic                  req_i,
  input  logic                  we_i,
  input  logic                  reg_sel_i,
  input  logic [5:0]            addr_i,
  input  logic [31:0]           wdata_i,
  output logic [31:0]           rdata_o,
  // local histogram
  output logic [BINS*W_FPGA-1:0] hist_o,
  output logic                  hist_valid_o,
  output tc_state_e             state_o
);
  logic [LAYERS*PADS-1:0] pattern;
  logic                   pat_valid;
  logic [BINS*HALF_PADS-1:0] hits;
  logic                   hits_valid;
  logic [HALF_BITS-1:0]   half_data;
  logic [31:0]            remote;
  logic [15:0]            ev_count;
  logic [31:0]            ro_word;
  logic                   copying, done;
  logic [2:0]             nevents;
  logic                   pen_q;
  tc_state_e              state;

  chamber_demux u_demux (
    .clk, .rst, .phase_i, .line_i,
    .pattern_o(pattern), .valid_o(pat_valid)
  );

  track_finder #(.HALF(HALF)) u_track (
    .clk, .rst, .valid_i(pat_valid), .pattern_i(pattern),
    .hits_o(hits), .valid_o(hits_valid)
  );

  local_histogram u_hist (
    .clk, .rst, .valid_i(hits_valid), .hits_i(hits),
    .hist_o, .valid_o(hist_valid_o)
  );

  always_comb begin
    for (int c = 0; c < int'(LAYERS); c++)
      half_data[HALF_PADS*c +: HALF_PADS] = pattern[PADS*c + HALF_PADS*HALF +: HALF_PADS];
  end

  event_pipeline #(.DEPTH(DEPTH), .LATENCY(LATENCY)) u_pipe (
    .clk, .rst,
    .run_i(remote[0]), .pen_i, .bc_i(pat_valid), .data_i(half_data),
    .window_i(remote[6:4]), .rd_addr_i(addr_i), .rd_data_o(ro_word),
    .copying_o(copying), .done_o(done), .nevents_o(nevents)
  );

  wire wr_remote = req_i && we_i && reg_sel_i && addr_i == 6'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      remote   <= 32'h0000_0050;   // window 5, pipeline disabled
      ev_count <= '0;
      state    <= TC_IDLE;
      pen_q    <= 1'b0;
    end else begin
      pen_q <= pen_i;
      if (wr_remote) remote <= {wdata_i[31:2], 1'b0, wdata_i[0]};
      if (done) ev_count <= ev_count + 1'b1;
      if (!remote[0] && !(wr_remote && wdata_i[0])) state <= TC_IDLE;
      else if (copying) state <= TC_COPY;
      else if (done) state <= TC_VALID;
      else if (wr_remote && wdata_i[1] && (state == TC_VALID || state == TC_REJECT))
        state <= TC_RUN;
      else if (state == TC_VALID && pen_i && !pen_q) state <= TC_REJECT;
      else if (state == TC_IDLE) state <= TC_RUN;
    end
  end

  assign state_o = state;

  always_comb begin
    if (!reg_sel_i) rdata_o = ro_word;
    else unique case (addr_i)
      6'd0:    rdata_o = {ev_count, 9'd0, nevents, 1'b0, state};
      6'd1:    rdata_o = remote;
      default: rdata_o = 32'h0;
    endcase
  end
endmodule
