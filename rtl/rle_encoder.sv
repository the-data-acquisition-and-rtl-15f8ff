// rle_encoder -- run length encoder for the sparse pad patterns of the
// chamber readout (reversible data reduction).
//
// The bit pattern arrives serially, one bit per accepted cycle (valid/ready,
// last marks the final bit). The encoder emits, alternately, the length of a
// run of 0s (W0 bits) and the length of the following run of 1s (W1 bits),
// starting with a run of 0s, which may be empty. A run longer than the
// largest number its field holds is split: the full count is emitted,
// followed by a count of zero for the other value, and counting continues.
// Emitting that extra zero takes one cycle during which ready_o is low; so
// does emitting the final run after the last bit.
// Example with W0 = 4, W1 = 2: 000000 1 00000000000 11 00000 1 000000 gives
// 0110 01 1011 10 0101 01 0110.
// Parameters follow the three variants studied for the readout: (8,8),
// (6,2) and (5,3); the default (6,2) is the one chosen for the system.
//
// Output: one code per cycle at most, code_o (right aligned), code_one_o
// (1 = length of a run of 1s, so W1 bits wide, else W0 bits), code_valid_o.
// bits_o counts the encoded bits since start_i; done_o pulses with the last
// code of a pattern.
module rle_encoder #(
  parameter int unsigned W0 = 6,
  parameter int unsigned W1 = 2,
  localparam int unsigned WC = (W0 > W1) ? W0 : W1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start_i,      // clears the bit counter for a new pattern
  input  logic          valid_i,
  input  logic          bit_i,
  input  logic          last_i,
  output logic          ready_o,
  output logic [WC-1:0] code_o,
  output logic          code_one_o,
  output logic          code_valid_o,
  output logic [31:0]   bits_o,
  output logic          done_o
);
  localparam logic [WC-1:0] MAX0 = WC'((1 << W0) - 1);
  localparam logic [WC-1:0] MAX1 = WC'((1 << W1) - 1);

  logic          cur;      // value whose run is being counted
  logic [WC-1:0] cnt;
  logic          pend;     // emit a zero-length run of !cur
  logic          flush;    // emit the final run

  assign ready_o = !pend && !flush;
  wire [WC-1:0] max_cur = cur ? MAX1 : MAX0;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur <= 1'b0; cnt <= '0; pend <= 1'b0; flush <= 1'b0;
      code_o <= '0; code_one_o <= 1'b0; code_valid_o <= 1'b0;
      bits_o <= '0; done_o <= 1'b0;
    end else begin
      code_valid_o <= 1'b0;
      done_o       <= 1'b0;
      if (start_i) bits_o <= '0;
      if (pend) begin
        code_o       <= '0;
        code_one_o   <= !cur;
        code_valid_o <= 1'b1;
        bits_o       <= bits_o + (cur ? W0 : W1);
        pend         <= 1'b0;
      end else if (flush) begin
        code_o       <= cnt;
        code_one_o   <= cur;
        code_valid_o <= 1'b1;
        bits_o       <= bits_o + (cur ? W1 : W0);
        done_o       <= 1'b1;
        flush        <= 1'b0;
        cur          <= 1'b0;
        cnt          <= '0;
      end else if (valid_i) begin
        if (bit_i == cur) begin
          if (cnt == max_cur) begin
            code_o       <= cnt;
            code_one_o   <= cur;
            code_valid_o <= 1'b1;
            bits_o       <= (start_i ? 32'd0 : bits_o) + (cur ? W1 : W0);
            pend         <= 1'b1;
            cnt          <= WC'(1);
          end else begin
            cnt <= cnt + 1'b1;
          end
        end else begin
          code_o       <= cnt;
          code_one_o   <= cur;
          code_valid_o <= 1'b1;
          bits_o       <= (start_i ? 32'd0 : bits_o) + (cur ? W1 : W0);
          cur          <= bit_i;
          cnt          <= WC'(1);
        end
        if (last_i) flush <= 1'b1;
      end
    end
  end
endmodule
