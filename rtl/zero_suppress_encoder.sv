// zero_suppress_encoder -- zero suppression of a block of 2^N pad bits
// (reversible data reduction of the chamber readout).
//
// For every 1 in the block the encoder emits its position in the block as an
// N-bit number (bit 0 of block_i is position 0, the first bit of the
// pattern), in increasing order, one position per cycle; the number of 1s in
// the block is stored with it (count_o, N+1 bits, since all 2^N bits may be
// set). Example with N = 5: a 32-bit block with 1s at positions 6, 18, 19
// and 25 gives 00110 10010 10011 11001. The default N = 8 (256-bit blocks,
// 8-bit numbers) is the variant chosen for the system.
//
// Timing: start_i loads a block (ignored while busy_o). One position per
// cycle follows; done_o pulses after the last one (one cycle after start for
// an empty block), with count_o and bits_o = (N+1) + N*count, the size of
// the encoded block.
module zero_suppress_encoder #(
  parameter int unsigned N = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start_i,
  input  logic [(1<<N)-1:0]  block_i,
  output logic               busy_o,
  output logic [N-1:0]       pos_o,
  output logic               pos_valid_o,
  output logic [N:0]         count_o,
  output logic [31:0]        bits_o,
  output logic               done_o
);
  logic [(1<<N)-1:0] rest;
  logic [N:0]        cnt;
  logic [N-1:0]      first;

  always_comb begin
    first = '0;
    for (int i = (1 << N) - 1; i >= 0; i--) if (rest[i]) first = N'(i);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rest <= '0; cnt <= '0; busy_o <= 1'b0;
      pos_o <= '0; pos_valid_o <= 1'b0; count_o <= '0; bits_o <= '0; done_o <= 1'b0;
    end else begin
      pos_valid_o <= 1'b0;
      done_o      <= 1'b0;
      if (!busy_o) begin
        if (start_i) begin
          rest   <= block_i;
          cnt    <= '0;
          busy_o <= 1'b1;
        end
      end else if (rest != '0) begin
        pos_o       <= first;
        pos_valid_o <= 1'b1;
        rest[first] <= 1'b0;
        cnt         <= cnt + 1'b1;
      end else begin
        busy_o  <= 1'b0;
        done_o  <= 1'b1;
        count_o <= cnt;
        bits_o  <= 32'(N + 1) + 32'(N) * 32'(cnt);
      end
    end
  end
endmodule
