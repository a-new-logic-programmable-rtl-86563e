// decode - holds the control code of each of the board's analog switches
// and rewrites one of them per command.
//
// A bank of NUM_SWITCHES 4-bit registers, one per switch, drives the
// switch controls (10 x 4 = 40 control lines per board). When enable is
// high at a clock edge, the register selected by switch_num loads
// pos_code(position); numbers at or above NUM_SWITCHES change nothing.
// All registers clear to 0000 on reset. The ten switches and their fields
// follow the original design; the position-to-code rule is the one in asm_pkg,
// chosen to agree with the original design's simulation results, and the handling
// of out-of-range switch numbers is this design's choice. A new code
// appears one clock after enable.
module decode
  import asm_pkg::*;
#(
  parameter int unsigned NUM_SWITCHES = asm_pkg::DEF_NUM_SWITCHES
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               enable,
  input  logic [SWNUM_W-1:0] switch_num,
  input  logic [POS_W-1:0]   position,
  output sw_ctrl_t           sw_ctrl [NUM_SWITCHES]
);

  sw_ctrl_t ctrl_q [NUM_SWITCHES];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < NUM_SWITCHES; i++) ctrl_q[i] <= '0;
    end else if (enable) begin
      for (int i = 0; i < NUM_SWITCHES; i++)
        if (switch_num == SWNUM_W'(i)) ctrl_q[i] <= pos_code(position);
    end
  end

  assign sw_ctrl = ctrl_q;

  initial assert (NUM_SWITCHES <= 2**SWNUM_W)
    else $error("decode: NUM_SWITCHES exceeds the switch number field");

endmodule
