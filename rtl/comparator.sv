// comparator - tells whether the latched identification code is this
// board's own.
//
// equal is high when the code latched from the first protocol byte matches
// the code set on the board's DIP switch. Combinational. Function as in the
// document.
module comparator
  import asm_pkg::*;
(
  input  logic [ID_W-1:0] board,
  input  logic [ID_W-1:0] dip,
  output logic            equal
);

  assign equal = (board == dip);

endmodule
