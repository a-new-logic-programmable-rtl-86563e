// asm_pkg - shared widths, field layouts and types of the audio switching
// matrix.
//
// The host talks to the boards over one parallel port: three strobes
// (SB, SSP, YACK) and an 8-bit data byte travel down the chain of boards,
// and three active-low replies (ACK_B, ACK_SP, ERROR) travel back. Each
// byte carries an even-parity bit in bit 7. The first byte of a
// transaction holds a 7-bit board identification code in bits 6..0; the
// second holds a 4-bit switch number in bits 6..3 and a 3-bit position in
// bits 2..0. These layouts, the 7-bit code and the ten switches per board
// follow the original design. The 4-bit control code per switch is this design's
// reading of the original design's simulation results (see pos_code below).
package asm_pkg;

  localparam int unsigned ID_W         = 7;   // identification code width
  localparam int unsigned SWNUM_W      = 4;   // switch number field width
  localparam int unsigned POS_W        = 3;   // position field width
  localparam int unsigned CTRL_W       = 4;   // control lines per switch
  localparam int unsigned DEF_NUM_SWITCHES = 10; // switches per board
  localparam int unsigned DEF_NUM_BOARDS   = 40; // boards in the console (4 x 10)

  // Host-to-board signals carried down the chain (all active high).
  typedef struct packed {
    logic       sb;    // select board
    logic       ssp;   // select switch and position
    logic       yack;  // host has seen the acknowledge
    logic [7:0] data;  // parallel port data byte
  } host_cmd_t;

  // Board-to-host replies, all active low (1 = idle).
  typedef struct packed {
    logic ack_b_n;
    logic ack_sp_n;
    logic error_n;
  } board_resp_t;

  localparam board_resp_t RESP_IDLE = '{ack_b_n: 1'b1, ack_sp_n: 1'b1, error_n: 1'b1};

  typedef logic [CTRL_W-1:0] sw_ctrl_t;

  // Control code driven to the analog switches for a position p:
  // {p[2], ~p[2], ~p[1], ~p[0]}. Bits 3..2 pick one of two halves of the
  // position space and bits 1..0 carry the inverted low position bits.
  // After reset every switch holds 4'b0000, a code no position produces.
  function automatic sw_ctrl_t pos_code(input logic [POS_W-1:0] p);
    return {p[2], ~p[2], ~p[1], ~p[0]};
  endfunction

  // Even parity: returns 1 when the byte holds an odd number of ones.
  function automatic logic parity_error(input logic [7:0] b);
    return ^b;
  endfunction

endpackage
