// event_pipeline -- chamber-data pipeline and readout register of one
// trigger FPGA (half a sector in phi, 5 CIPiX chips x 60 pads = 300 bits).
//
// While Pipeline Enable (pen_i) is high and the pipeline is enabled (run_i),
// the half-sector pattern of every bunch crossing (bc_i) is written into a
// circular buffer of DEPTH entries. A falling edge of Pipeline Enable is the
// L1 Keep: writing stops, and the event window -- window_i consecutive
// bunch crossings centred on the triggered one -- is copied, one event per
// cycle, into the readout register, which is independent of the pipeline.
// The triggered crossing is the entry LATENCY places behind the next free
// slot, i.e. stored LATENCY-1 crossings before the last stored one (the L1
// decision comes about 2.3 us = 24 BC after the crossing). A rising
// edge of Pipeline Enable restarts writing. done_o pulses when the copy is
// complete.
//
// Readout register layout (as the document maps it on VME): every event is 10
// D32 words; words 2c and 2c+1 of an event hold CIPiX chip c (= layer c):
// pads 0..29 in bits 29:0 of the first word and pads 30..59 in the second.
// The four spare bits per chip (bits 31:30 of both words) carry parity: bit
// 30 is the even parity of the 30 pads in that word, bit 31 is zero. Using
// the spare bits for parity is the document's suggestion; the exact parity
// scheme and the pipeline depth (32) are this design's choices.
// Word address of event e, word w: 10*e + w. rd_data_o is combinational.
module event_pipeline
  import cip_pkg::*;
#(
  parameter int unsigned DEPTH      = 32,
  parameter int unsigned LATENCY    = 24,
  parameter int unsigned MAX_WINDOW = 5,
  parameter int unsigned NCHIPS     = LAYERS
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         run_i,     // pipeline enabled by remote register
  input  logic                         pen_i,     // Pipeline Enable
  input  logic                         bc_i,      // new bunch-crossing data on data_i
  input  logic [NCHIPS*HALF_PADS-1:0]  data_i,    // chip c in bits [60c +: 60]
  input  logic [2:0]                   window_i,  // events to copy, 1..MAX_WINDOW (odd)
  input  logic [$clog2(MAX_WINDOW*WORDS_PER_EVENT)-1:0] rd_addr_i,
  output logic [31:0]                  rd_data_o,
  output logic                         copying_o,
  output logic                         done_o,
  output logic [2:0]                   nevents_o  // events held in the readout register
);
  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned NW  = MAX_WINDOW * WORDS_PER_EVENT;
  localparam int unsigned EWB = NCHIPS * HALF_PADS;

  logic [EWB-1:0] mem [DEPTH];
  logic [31:0]    rreg [NW];
  logic [AW-1:0]  wr_ptr;
  logic           pen_q;
  logic           copying;
  logic [2:0]     cp_cnt;
  logic [2:0]     cp_n;
  logic [AW-1:0]  cp_ptr;

  wire pen_fall = pen_q & ~pen_i;
  wire [2:0] win = (window_i == 0) ? 3'd1 :
                   (window_i > 3'(MAX_WINDOW)) ? 3'(MAX_WINDOW) : window_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr    <= '0;
      pen_q     <= 1'b0;
      copying   <= 1'b0;
      cp_cnt    <= '0;
      cp_n      <= '0;
      cp_ptr    <= '0;
      done_o    <= 1'b0;
      nevents_o <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
      for (int i = 0; i < int'(NW); i++)    rreg[i] <= '0;
    end else begin
      pen_q  <= pen_i;
      done_o <= 1'b0;
      if (bc_i && pen_i && run_i && !copying) begin
        mem[wr_ptr] <= data_i;
        wr_ptr      <= wr_ptr + 1'b1;
      end
      if (pen_fall && run_i && !copying) begin
        copying <= 1'b1;
        cp_cnt  <= '0;
        cp_n    <= win;
        // first event of the window: triggered entry minus half the window
        cp_ptr  <= wr_ptr - AW'(LATENCY) - AW'(win / 2);
      end else if (copying) begin
        for (int c = 0; c < int'(NCHIPS); c++) begin
          logic [29:0] lo, hi;
          lo = mem[cp_ptr][HALF_PADS*c +: 30];
          hi = mem[cp_ptr][HALF_PADS*c + 30 +: 30];
          rreg[WORDS_PER_EVENT*cp_cnt + 2*c]     <= {1'b0, ^lo, lo};
          rreg[WORDS_PER_EVENT*cp_cnt + 2*c + 1] <= {1'b0, ^hi, hi};
        end
        cp_ptr <= cp_ptr + 1'b1;
        cp_cnt <= cp_cnt + 1'b1;
        if (cp_cnt + 1'b1 == cp_n) begin
          copying   <= 1'b0;
          done_o    <= 1'b1;
          nevents_o <= cp_n;
        end
      end
    end
  end

  assign rd_data_o = (32'(rd_addr_i) < NW) ? rreg[rd_addr_i] : 32'h0;
  assign copying_o = copying;

  initial assert (DEPTH > LATENCY + MAX_WINDOW) else $error("pipeline too short");
endmodule
