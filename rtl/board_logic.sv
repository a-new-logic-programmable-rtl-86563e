// board_logic - the programmable logic of one switching board: receives
// the host's two-byte commands and drives the board's 40 analog switch
// control lines.
//
// Three synchronizers bring SB, SSP and YACK into the clock domain. The
// data path holds the latch (fields of the byte), the parity checker (on
// the raw port byte), the comparator (latched code against the DIP switch)
// and the decoder (ten 4-bit switch control registers). The controller
// FSM sequences them and drives the active-low replies ACK_B, ACK_SP and
// ERROR. The split into these blocks and their connections follow the
// document's detailed architecture; details of each block are described in
// its own file.
//
// Timing: a strobe edge on the port reaches the FSM after the synchronizer
// (SYNC_STAGES clocks); the reply goes low two clocks after that, and a
// switch control changes one clock before ACK_SP goes low.
module board_logic
  import asm_pkg::*;
#(
  parameter int unsigned NUM_SWITCHES = asm_pkg::DEF_NUM_SWITCHES,
  parameter int unsigned SYNC_STAGES  = 2,
  parameter int unsigned ERR_PULSE    = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sb,
  input  logic            ssp,
  input  logic            yack,
  input  logic [7:0]      data,
  input  logic [ID_W-1:0] dip_switch,
  output logic            ack_b_n,
  output logic            ack_sp_n,
  output logic            error_n,
  output sw_ctrl_t        sw_ctrl [NUM_SWITCHES]
);

  logic               sb_s, ssp_s, yack_s;
  logic               latch_en, decode_en, par_err, equal;
  logic [ID_W-1:0]    board;
  logic [SWNUM_W-1:0] switch_num;
  logic [POS_W-1:0]   position;

  sync #(.STAGES(SYNC_STAGES)) u_sync_sb   (.clk, .reset(rst), .datain(sb),   .dataout(sb_s));
  sync #(.STAGES(SYNC_STAGES)) u_sync_ssp  (.clk, .reset(rst), .datain(ssp),  .dataout(ssp_s));
  sync #(.STAGES(SYNC_STAGES)) u_sync_yack (.clk, .reset(rst), .datain(yack), .dataout(yack_s));

  latch u_latch (
    .clk, .reset(rst), .enable(latch_en), .data(data[ID_W-1:0]),
    .board, .switch_num, .position
  );

  parity u_parity (.d(data), .parity_err(par_err));

  comparator u_comparator (.board, .dip(dip_switch), .equal);

  decode #(.NUM_SWITCHES(NUM_SWITCHES)) u_decode (
    .clk, .reset(rst), .enable(decode_en), .switch_num, .position, .sw_ctrl
  );

  controller #(.ERR_PULSE(ERR_PULSE)) u_controller (
    .clk, .reset(rst), .sb(sb_s), .ssp(ssp_s), .yack(yack_s),
    .equal, .errorin(par_err),
    .latch(latch_en), .decode(decode_en),
    .errorout(error_n), .ack_b(ack_b_n), .ack_sp(ack_sp_n)
  );

endmodule
