// switch_board - the digital part of one switching board: its programmable
// logic plus the gate that merges its replies into the reply chain.
//
// The host signals (SB, SSP, YACK, DATA) arrive on cmd and are passed on
// unchanged to the next board by the enclosing console; the board buffer
// that re-drives them is electrical only. The board's own active-low
// replies are merged with resp_from_next (the merged replies of all boards
// further down) and leave on resp toward the parallel port. sw_ctrl is the
// board's 40-line control of its analog switches. The structure follows the
// document's board diagram.
module switch_board
  import asm_pkg::*;
#(
  parameter int unsigned NUM_SWITCHES = asm_pkg::DEF_NUM_SWITCHES,
  parameter int unsigned SYNC_STAGES  = 2,
  parameter int unsigned ERR_PULSE    = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  host_cmd_t       cmd,
  input  logic [ID_W-1:0] dip_switch,
  input  board_resp_t     resp_from_next,
  output board_resp_t     resp,
  output sw_ctrl_t        sw_ctrl [NUM_SWITCHES]
);

  board_resp_t own;

  board_logic #(
    .NUM_SWITCHES(NUM_SWITCHES), .SYNC_STAGES(SYNC_STAGES), .ERR_PULSE(ERR_PULSE)
  ) u_logic (
    .clk, .rst,
    .sb(cmd.sb), .ssp(cmd.ssp), .yack(cmd.yack), .data(cmd.data),
    .dip_switch,
    .ack_b_n(own.ack_b_n), .ack_sp_n(own.ack_sp_n), .error_n(own.error_n),
    .sw_ctrl
  );

  output_or u_or (.own, .from_next(resp_from_next), .merged(resp));

endmodule
