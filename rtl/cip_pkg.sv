// cip_pkg -- shared constants and types of the CIP2000 z-vertex trigger and
// its readout/control logic.
//
// The whole model runs on one clock, the trigger-card FPGA clock of 41.6 MHz,
// which is four times the HERA bunch-crossing clock (10.4 MHz, 1 BC = 96 ns).
// A two-bit phase counter marks the four fast cycles of a bunch crossing;
// logic that the real system clocks with the HERA clock (STC cards, control
// card) runs on the same clock with a once-per-BC enable.
//
// Chamber numbers follow the document: 5 layers, 16 sectors in phi, 120 pad
// positions per layer and sector, 15 histogram bins, histogram numbers of
// 6/7/10/11 bits at the FPGA/card/pre-sum/main-sum stages. The line
// numbering of the multiplexed chamber data is this design's own choice.
// MUX, SECTORS and ENV name the multiplexing factor, the number of sectors
// and the environment width for the reader; the modules use derived numbers.
package cip_pkg;

  localparam int unsigned LAYERS      = 5;    // chamber layers
  localparam int unsigned SECTORS     = 16;   // sectors in phi
  localparam int unsigned PADS        = 120;  // pad positions per layer and sector
  localparam int unsigned HALF_PADS   = 60;   // pads per CIPiX chip = per FPGA and layer
  localparam int unsigned MUX         = 4;    // multiplexing of the CIPiX
  localparam int unsigned LINES       = 150;  // multiplexed lines per sector (600/4)
  localparam int unsigned HALF_LINES  = 15;   // lines per CIPiX (60/4)
  localparam int unsigned BINS        = 15;   // z-vertex histogram bins
  localparam int unsigned ENV         = 15;   // pads of a local environment per layer
  localparam int unsigned MID_LAYER   = 2;    // layer holding the central pads

  localparam int unsigned W_FPGA      = 6;    // local histogram numbers in one FPGA
  localparam int unsigned W_CARD      = 7;    // sector histogram numbers
  localparam int unsigned W_PRESUM    = 10;   // eight-sector histogram numbers
  localparam int unsigned W_MAIN      = 11;   // main histogram numbers

  localparam int unsigned HALF_BITS   = LAYERS * HALF_PADS;  // 300 bits per FPGA
  localparam int unsigned WORDS_PER_EVENT = 10;               // D32 words per event

  // Trigger-card FPGA operating state, shown in its mode register.
  typedef enum logic [2:0] {
    TC_IDLE    = 3'd0,   // not enabled by the remote register
    TC_RUN     = 3'd1,   // pipeline running, waiting for L1 Keep
    TC_COPY    = 3'd2,   // pipeline stopped, event window being copied
    TC_VALID   = 3'd3,   // readout register holds a valid event window
    TC_REJECT  = 3'd4    // Pipeline Enable came back before the CPU took the data
  } tc_state_e;

  // VME address modifiers for A24 access (VME standard).
  localparam logic [5:0] AM_A24_DATA  = 6'h39;  // non-privileged data
  localparam logic [5:0] AM_A24_BLT   = 6'h3B;  // non-privileged block transfer
  localparam logic [5:0] AM_A24_SDATA = 6'h3D;  // supervisory data
  localparam logic [5:0] AM_A24_SBLT  = 6'h3F;  // supervisory block transfer

  // STC Fast Card modes of operation.
  typedef enum logic [2:0] {
    STC_SUBMISSIVE   = 3'd0,
    STC_DATA_AUTO    = 3'd1,
    STC_L2_AUTO      = 3'd2,
    STC_TRIG_AUTO    = 3'd3,
    STC_CLOCK_AUTO   = 3'd4
  } stc_mode_e;

  // Local-bus access presented by a VME slave controller to the logic
  // behind it (FPGA registers, card registers).
  typedef struct packed {
    logic        req;     // one-cycle request
    logic        we;      // 1 = write
    logic [15:0] addr;    // VME address bits A15..A0
    logic [31:0] wdata;
  } lbus_req_t;

endpackage
