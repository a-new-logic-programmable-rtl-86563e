// controller - finite-state machine that runs one board's side of the
// parallel-port handshake.
//
// The host first pulses SB with a board code on the port. Every board
// latches the byte; the board whose DIP code matches pulls ACK_B low and
// holds it until the host pulses YACK. The host then pulses SSP with a
// switch/position byte; the selected board latches it, enables DECODE for
// one clock so the switch takes its new position, pulls ACK_SP low and
// holds it until the next YACK, then returns to stand-by. A byte with a
// parity error produces an ERR_PULSE-clock low pulse on ERROR and sends
// the board back to stand-by: on SB every board reports it, whatever its
// code, on SSP only the selected board.
//
// Inputs sb, ssp and yack are already synchronized; the FSM acts on their
// rising edges. latch and decode are one-clock enables for the data path.
// errorin (PARITY) is sampled on the clock edge where latch is high, and
// equal (COMPARATOR) is used one clock later, when the latch holds the new
// byte. ack_b, ack_sp and errorout are registered and active low. Timing:
// a synchronized strobe edge leads to ACK_B, ACK_SP or ERROR going low two
// clocks later.
//
// The signals, their polarity, the handshake order and the return to
// stand-by after an error follow the original design. Edge-triggered strobes,
// holding each acknowledge until YACK, the error pulse length, and
// restarting identification on an SB while waiting for SSP are this
// design's choices.
module controller #(
  parameter int unsigned ERR_PULSE = 8
) (
  input  logic clk,
  input  logic reset,
  input  logic sb,
  input  logic ssp,
  input  logic yack,
  input  logic equal,
  input  logic errorin,
  output logic latch,
  output logic decode,
  output logic errorout,
  output logic ack_b,
  output logic ack_sp
);

  typedef enum logic [2:0] {
    ST_IDLE,      // stand-by, waiting for SB
    ST_CHECK_B,   // board code latched: check parity and code
    ST_ACK_B,     // board selected, ACK_B low until YACK
    ST_WAIT_SSP,  // waiting for the switch/position byte
    ST_CHECK_SP,  // switch/position latched: check parity, update switch
    ST_ACK_SP,    // ACK_SP low until YACK
    ST_ERROR      // ERROR low for ERR_PULSE clocks
  } state_t;

  localparam int unsigned CNT_W = (ERR_PULSE > 1) ? $clog2(ERR_PULSE) : 1;

  state_t           state_q, state_d;
  logic             sb_q, ssp_q, yack_q;
  logic             perr_q;
  logic [CNT_W-1:0] cnt_q;
  logic             sb_rise, ssp_rise, yack_rise;

  assign sb_rise   = sb   & ~sb_q;
  assign ssp_rise  = ssp  & ~ssp_q;
  assign yack_rise = yack & ~yack_q;

  always_comb begin
    state_d = state_q;
    latch   = 1'b0;
    decode  = 1'b0;
    unique case (state_q)
      ST_IDLE: begin
        if (sb_rise) begin
          latch   = 1'b1;
          state_d = ST_CHECK_B;
        end
      end
      ST_CHECK_B: begin
        if (perr_q)     state_d = ST_ERROR;
        else if (equal) state_d = ST_ACK_B;
        else            state_d = ST_IDLE;
      end
      ST_ACK_B: begin
        if (yack_rise) state_d = ST_WAIT_SSP;
      end
      ST_WAIT_SSP: begin
        if (sb_rise) begin
          latch   = 1'b1;
          state_d = ST_CHECK_B;
        end else if (ssp_rise) begin
          latch   = 1'b1;
          state_d = ST_CHECK_SP;
        end
      end
      ST_CHECK_SP: begin
        if (perr_q) state_d = ST_ERROR;
        else begin
          decode  = 1'b1;
          state_d = ST_ACK_SP;
        end
      end
      ST_ACK_SP: begin
        if (yack_rise) state_d = ST_IDLE;
      end
      ST_ERROR: begin
        if (cnt_q == CNT_W'(ERR_PULSE - 1)) state_d = ST_IDLE;
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state_q  <= ST_IDLE;
      sb_q     <= 1'b0;
      ssp_q    <= 1'b0;
      yack_q   <= 1'b0;
      perr_q   <= 1'b0;
      cnt_q    <= '0;
      ack_b    <= 1'b1;
      ack_sp   <= 1'b1;
      errorout <= 1'b1;
    end else begin
      state_q  <= state_d;
      sb_q     <= sb;
      ssp_q    <= ssp;
      yack_q   <= yack;
      if (latch) perr_q <= errorin;
      cnt_q    <= (state_q == ST_ERROR) ? cnt_q + 1'b1 : '0;
      ack_b    <= (state_d != ST_ACK_B);
      ack_sp   <= (state_d != ST_ACK_SP);
      errorout <= (state_d != ST_ERROR);
    end
  end

  // At most one reply line is low at any time.
  a_one_reply: assert property (@(posedge clk) disable iff (reset)
    $onehot0({~ack_b, ~ack_sp, ~errorout}));
  // DECODE only fires for a byte that passed the parity check.
  a_decode_clean: assert property (@(posedge clk) disable iff (reset)
    decode |-> !perr_q);

  initial assert (ERR_PULSE >= 1) else $error("controller: ERR_PULSE must be at least 1");

endmodule
