// audio_switch_matrix - the complete console: NUM_BOARDS identical
// switching boards (4 rows of 10 on the ship) on one host parallel port.
//
// Each board has its own identification code on a DIP switch (dip_switch
// port) and ten audio switches driven by 4 control lines each (sw_ctrl).
// The host command lines fan out to every board along the daisy chain;
// replies are merged board by board from the end of the chain toward the
// port, so resp is low on a line when any board pulls it low. Board 0 is
// nearest the port. A transaction is: SB with a board code, ACK_B, YACK,
// then SSP with a switch number and position, ACK_SP, YACK. Only the
// addressed board changes a switch.
//
// The board count, the code and byte formats, and the chain of boards
// follow the original design. The order of boards along the chain is this
// design's choice; it does not change behaviour, since every board sees
// the same command lines.
module audio_switch_matrix
  import asm_pkg::*;
#(
  parameter int unsigned NUM_BOARDS   = asm_pkg::DEF_NUM_BOARDS,
  parameter int unsigned NUM_SWITCHES = asm_pkg::DEF_NUM_SWITCHES,
  parameter int unsigned SYNC_STAGES  = 2,
  parameter int unsigned ERR_PULSE    = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  host_cmd_t       cmd,
  input  logic [ID_W-1:0] dip_switch [NUM_BOARDS],
  output board_resp_t     resp,
  output sw_ctrl_t        sw_ctrl [NUM_BOARDS][NUM_SWITCHES]
);

  // chain[i] is the merged reply of boards i .. NUM_BOARDS-1.
  board_resp_t chain [NUM_BOARDS+1];

  assign chain[NUM_BOARDS] = RESP_IDLE;

  for (genvar b = 0; b < NUM_BOARDS; b++) begin : g_board
    switch_board #(
      .NUM_SWITCHES(NUM_SWITCHES), .SYNC_STAGES(SYNC_STAGES), .ERR_PULSE(ERR_PULSE)
    ) u_board (
      .clk, .rst, .cmd,
      .dip_switch(dip_switch[b]),
      .resp_from_next(chain[b+1]),
      .resp(chain[b]),
      .sw_ctrl(sw_ctrl[b])
    );
  end

  assign resp = chain[0];

endmodule
