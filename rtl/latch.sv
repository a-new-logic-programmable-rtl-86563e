// latch - captures the seven field bits of the parallel-port byte and
// splits them into the fields of the two protocol bytes.
//
// When enable is high at a clock edge the register loads data[6:0]. The
// outputs present the same stored bits three ways: board (bits 6..0, the
// identification code of the first byte), switch_num (bits 6..3) and
// position (bits 2..0) of the second byte. The parity bit is not stored;
// the parity checker looks at the port directly. The field layout follows
// the original design; using a clock-enabled register rather than a transparent
// latch, and clearing it on reset, are this design's choices. Outputs
// change one clock after enable.
module latch
  import asm_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  logic               enable,
  input  logic [ID_W-1:0]    data,
  output logic [ID_W-1:0]    board,
  output logic [SWNUM_W-1:0] switch_num,
  output logic [POS_W-1:0]   position
);

  logic [ID_W-1:0] data_q;

  always_ff @(posedge clk or posedge reset) begin
    if (reset)       data_q <= '0;
    else if (enable) data_q <= data;
  end

  assign board      = data_q;
  assign switch_num = data_q[ID_W-1 -: SWNUM_W];
  assign position   = data_q[POS_W-1:0];

endmodule
