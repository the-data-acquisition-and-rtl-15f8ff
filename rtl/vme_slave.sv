// vme_slave -- VME A24/D32 slave controller, the function of the Lattice PLD
// on the trigger, sum and control cards.
//
// The VME strobes are asynchronous; they are brought into the card clock with
// two flip-flops each. When AS* is seen low, the address and address modifier
// are taken: the card answers if A23..A16 equal its base address (the two
// rotary switches, base_i) and the modifier is an A24 data or block-transfer
// code, and the access is D32 (LWORD* low). For every data strobe (DS0* and
// DS1* low) the controller issues one local-bus request carrying A15..A0 and,
// for a write, the data; when the local logic answers (ack_i, with rdata_i for
// a read) it drives the read data and pulls DTACK* low, and releases both when
// the master lifts the data strobes. In block mode AS* stays low and each
// further data strobe is one more 32-bit word at the next address (+4),
// which is how the CPU reads the 10-word events of the readout register.
//
// Address map of a card (after the document's figure of the trigger-card VME
// resources): A23..A16 card, A15 selects the controller's own registers,
// A14..A13 select a resource in the FPGAs, A7..A2 a word in it; A12..A8 and
// A1..A0 are unused. This module only forwards A15..A0; the card decodes them.
// (A1 arrives on addr_i but, with D32 transfers only, is not used.)
// Bus timeout and BERR* belong to the slot-1 CPU and are not generated here.
// The block-transfer daisy chain that lets one block span several trigger
// cards is not modelled: a block stays within one card.
//
// Outputs are active low and meant for wired-OR buses: data_oe_o says when
// data_o drives D31..D0.
module vme_slave
  import cip_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  base_i,       // rotary switches: A23..A16
  // VME data transfer bus
  input  logic        as_n_i,
  input  logic [1:0]  ds_n_i,
  input  logic        write_n_i,
  input  logic        lword_n_i,
  input  logic [5:0]  am_i,
  input  logic [23:1] addr_i,
  input  logic [31:0] data_i,
  output logic [31:0] data_o,
  output logic        data_oe_o,
  output logic        dtack_n_o,
  // local bus towards the card logic
  output lbus_req_t   lreq_o,
  input  logic        ack_i,
  input  logic [31:0] rdata_i
);
  typedef enum logic [2:0] {S_IDLE, S_SEL, S_WAIT, S_ACK, S_END} state_e;
  state_e state;

  logic [1:0] as_s, ds0_s, ds1_s;
  logic [15:0] addr_q;
  logic        block_q;

  wire as_low = ~as_s[1];
  wire ds_low = ~ds0_s[1] & ~ds1_s[1];
  wire ds_high = ds0_s[1] & ds1_s[1];
  wire am_ok  = (am_i == AM_A24_DATA) || (am_i == AM_A24_SDATA) ||
                (am_i == AM_A24_BLT)  || (am_i == AM_A24_SBLT);
  wire am_blk = (am_i == AM_A24_BLT)  || (am_i == AM_A24_SBLT);

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s <= 2'b11; ds0_s <= 2'b11; ds1_s <= 2'b11;
      state     <= S_IDLE;
      addr_q    <= '0;
      block_q   <= 1'b0;
      data_o    <= '0;
      data_oe_o <= 1'b0;
      dtack_n_o <= 1'b1;
      lreq_o    <= '0;
    end else begin
      as_s  <= {as_s[0],  as_n_i};
      ds0_s <= {ds0_s[0], ds_n_i[0]};
      ds1_s <= {ds1_s[0], ds_n_i[1]};
      lreq_o.req <= 1'b0;
      unique case (state)
        S_IDLE: if (as_low) begin
          if (addr_i[23:16] == base_i && am_ok && !lword_n_i) begin
            addr_q  <= {addr_i[15:2], 2'b00};
            block_q <= am_blk;
            state   <= S_SEL;
          end else begin
            state <= S_END;            // not for this card
          end
        end
        S_SEL: begin
          if (!as_low) state <= S_IDLE;
          else if (ds_low) begin
            lreq_o.req   <= 1'b1;
            lreq_o.we    <= ~write_n_i;
            lreq_o.addr  <= addr_q;
            lreq_o.wdata <= data_i;
            state        <= S_WAIT;
          end
        end
        S_WAIT: if (ack_i) begin
          if (write_n_i) begin
            data_o    <= rdata_i;
            data_oe_o <= 1'b1;
          end
          dtack_n_o <= 1'b0;
          state     <= S_ACK;
        end
        S_ACK: if (ds_high) begin
          dtack_n_o <= 1'b1;
          data_oe_o <= 1'b0;
          if (block_q && as_low) begin
            addr_q <= addr_q + 16'd4;
            state  <= S_SEL;
          end else begin
            state <= S_END;
          end
        end
        S_END: if (!as_low) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // DTACK* only falls while both data strobes are low.
  property p_dtack_needs_ds;
    @(posedge clk) disable iff (rst) $fell(dtack_n_o) |-> ds_low;
  endproperty
  assert property (p_dtack_needs_ds);
endmodule
