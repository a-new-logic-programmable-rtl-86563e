// parity - checks the parity bit of the byte on the parallel port.
//
// Every byte the host sends carries even parity over all eight bits (bit 7
// is the parity bit), so a byte with an odd number of ones has been
// corrupted. parity_err goes high in that case. Purely combinational; the
// controller samples it on the same clock edge that loads the latch. The
// even-parity rule follows the original design's worked examples.
module parity
  import asm_pkg::*;
(
  input  logic [7:0] d,
  output logic       parity_err
);

  assign parity_err = parity_error(d);

endmodule
