// host_port_if - testbench model of the host's parallel port.
//
// Holds the host-driven lines (SB, SSP, YACK, DATA) and the boards' three
// active-low replies, and provides the host side of the handshake as
// tasks: put a byte on DATA, pulse SB or SSP, wait for a reply, and finish
// an acknowledge with a YACK pulse. Every task reports which reply came
// and after how many clocks, so testbenches can check the protocol and its
// cycle timing. Also holds the reference functions the testbenches use to
// form bytes and to predict switch control codes: even parity over the
// byte, and the code table 0111 0110 0101 0100 1011 1010 1001 1000 for
// positions 0..7.
interface host_port_if (input logic clk);
  logic       sb = 1'b0, ssp = 1'b0, yack = 1'b0;
  logic [7:0] data = 8'h00;
  logic       ack_b_n, ack_sp_n, error_n;

  // Reply codes returned by the tasks (testbenches use the same values).
  localparam int R_NONE = 0, R_ACK_B = 1, R_ACK_SP = 2, R_ERROR = 3, R_SEVERAL = 4;

  int strobe_cycles = 3;   // length of each host strobe pulse, in clocks

  // Byte with its even-parity bit in bit 7.
  function automatic logic [7:0] with_parity(input logic [6:0] v);
    int n = 0;
    for (int i = 0; i < 7; i++) if (v[i]) n++;
    return {1'((n % 2) == 1), v};
  endfunction

  function automatic logic [3:0] ref_code(input int p);
    logic [3:0] t [8] = '{4'b0111, 4'b0110, 4'b0101, 4'b0100,
                          4'b1011, 4'b1010, 4'b1001, 4'b1000};
    return t[p];
  endfunction

  function automatic int current_reply();
    int n = 0;
    int r = R_NONE;
    if (!ack_b_n)  begin n++; r = R_ACK_B;  end
    if (!ack_sp_n) begin n++; r = R_ACK_SP; end
    if (!error_n)  begin n++; r = R_ERROR;  end
    return (n > 1) ? R_SEVERAL : r;
  endfunction

  // Put b on DATA, pulse SB (is_ssp = 0) or SSP (is_ssp = 1) and wait up to
  // timeout clocks for a reply. latency counts clocks from the strobe's
  // rising edge to the first clock at which a reply line is low.
  task automatic strobe(input bit is_ssp, input logic [7:0] b, input int timeout,
                        output int r, output int latency);
    @(negedge clk);
    data = b;
    if (is_ssp) ssp = 1'b1; else sb = 1'b1;
    r = R_NONE;
    latency = -1;
    for (int cyc = 1; cyc <= timeout; cyc++) begin
      @(posedge clk);
      #1;
      if (cyc == strobe_cycles) begin sb = 1'b0; ssp = 1'b0; end
      if (current_reply() != R_NONE) begin
        r = current_reply();
        latency = cyc;
        break;
      end
    end
    if (r == R_NONE) begin
      while (sb || ssp) begin @(posedge clk); #1; sb = 1'b0; ssp = 1'b0; end
    end
  endtask

  // Pulse YACK and count clocks until every reply line is high again.
  task automatic send_yack(input int timeout, output int release_latency);
    @(negedge clk);
    yack = 1'b1;
    release_latency = -1;
    for (int cyc = 1; cyc <= timeout; cyc++) begin
      @(posedge clk);
      #1;
      if (cyc == strobe_cycles) yack = 1'b0;
      if (release_latency < 0 && current_reply() == R_NONE) release_latency = cyc;
      if (release_latency >= 0 && !yack) break;
    end
    yack = 1'b0;
    data = 8'h00;
  endtask

  // Count clocks until the ERROR line returns high.
  task automatic wait_error_end(input int timeout, output int width);
    width = 1;
    while (!error_n && width < timeout) begin @(posedge clk); #1; if (!error_n) width++; end
    data = 8'h00;
  endtask
endinterface
