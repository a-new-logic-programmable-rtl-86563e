// output_or - merges this board's replies with those returning from the
// rest of the chain, so a single parallel port hears every board.
//
// ACK_B, ACK_SP and ERROR are active low, so "any board replies" is the OR
// of the asserted conditions: each merged line is low when this board or
// any board further down drives it low. Combinational. The original design places
// an OR gate here; treating it as an OR in negative logic is this design's
// reading.
module output_or
  import asm_pkg::*;
(
  input  board_resp_t own,
  input  board_resp_t from_next,
  output board_resp_t merged
);

  assign merged.ack_b_n  = ~(~own.ack_b_n  | ~from_next.ack_b_n);
  assign merged.ack_sp_n = ~(~own.ack_sp_n | ~from_next.ack_sp_n);
  assign merged.error_n  = ~(~own.error_n  | ~from_next.error_n);

endmodule
