// Bit-serial identifier comparator of a HIDRA routing unit.
//
// `clear` starts a new comparison (match flag set). On every cycle with `en`
// high the received bit `rx_bit` is compared with the local identifier bit
// `id_bit` and a mismatch clears the flag. `match` already includes the bit
// of the current cycle, so on the cycle where the trigger marks the last bit
// the result is final without an extra cycle. One flip-flop.
module hidra_serial_cmp (
  input  logic clk,
  input  logic clear,
  input  logic en,
  input  logic rx_bit,
  input  logic id_bit,
  output logic match
);
  logic match_q;

  always_ff @(posedge clk) begin
    if (clear)   match_q <= 1'b1;
    else if (en) match_q <= match;
  end

  assign match = match_q & ~(en & (rx_bit ^ id_bit));

endmodule
