// tb_switch_board - test of one board with its reply merge.
//
// The board (code 0001011) is driven through full transactions by the host
// model while the replies of the "rest of the chain" (resp_from_next) are
// driven by the test. Checks: the board's own ACK_B / ACK_SP / ERROR reach
// resp with the expected latency; switch controls follow the commands; and
// at random moments, with the board idle or acknowledging, every resp line
// is low exactly when the board or the chain pulls it low.
module tb_switch_board;
  import asm_pkg::*;
  localparam int NSW = 10;
  localparam int SYNC = 2;
  localparam int EP = 8;
  localparam int TO = 40;
  localparam logic [6:0] CODE = 7'b0001011;
  localparam int R_NONE = 0, R_ACK_B = 1, R_ACK_SP = 2, R_ERROR = 3;

  logic clk = 1'b0, rst = 1'b1;
  host_cmd_t   cmd;
  board_resp_t resp, from_next = RESP_IDLE;
  sw_ctrl_t    sw_ctrl [NSW];
  logic [3:0]  model [NSW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  host_port_if hp (clk);

  assign cmd = '{sb: hp.sb, ssp: hp.ssp, yack: hp.yack, data: hp.data};
  assign hp.ack_b_n  = resp.ack_b_n;
  assign hp.ack_sp_n = resp.ack_sp_n;
  assign hp.error_n  = resp.error_n;

  switch_board dut (.clk, .rst, .cmd, .dip_switch(CODE), .resp_from_next(from_next), .resp, .sw_ctrl);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic compare_all(input string tag);
    for (int i = 0; i < NSW; i++)
      check(sw_ctrl[i] === model[i], $sformatf("%s: SW%0d = %b exp %b", tag, i, sw_ctrl[i], model[i]));
  endtask

  // With the board's own replies known (own), try all chain replies.
  task automatic merge_sweep(input board_resp_t own, input string tag);
    for (int v = 0; v < 8; v++) begin
      from_next = board_resp_t'(v);
      #1;
      check(resp.ack_b_n  === (own.ack_b_n  & from_next.ack_b_n),  $sformatf("%s ack_b chain %b", tag, from_next));
      check(resp.ack_sp_n === (own.ack_sp_n & from_next.ack_sp_n), $sformatf("%s ack_sp chain %b", tag, from_next));
      check(resp.error_n  === (own.error_n  & from_next.error_n),  $sformatf("%s error chain %b", tag, from_next));
    end
    from_next = RESP_IDLE;
    #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, lat, rel;
    for (int i = 0; i < NSW; i++) model[i] = 4'b0000;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    merge_sweep(RESP_IDLE, "idle");

    for (int t = 0; t < 40; t++) begin
      automatic int s = $urandom_range(0, NSW - 1), p = $urandom_range(0, 7);
      hp.strobe(0, hp.with_parity(CODE), TO, r, lat);
      check(r == R_ACK_B && lat == SYNC + 2, $sformatf("t%0d select: reply %0d after %0d", t, r, lat));
      merge_sweep('{ack_b_n: 1'b0, ack_sp_n: 1'b1, error_n: 1'b1}, "during ACK_B");
      hp.send_yack(TO, rel);
      check(rel == SYNC + 1, $sformatf("t%0d ACK_B release after %0d", t, rel));
      hp.strobe(1, hp.with_parity({4'(s), 3'(p)}), TO, r, lat);
      check(r == R_ACK_SP && lat == SYNC + 2, $sformatf("t%0d switch: reply %0d after %0d", t, r, lat));
      merge_sweep('{ack_b_n: 1'b1, ack_sp_n: 1'b0, error_n: 1'b1}, "during ACK_SP");
      hp.send_yack(TO, rel);
      model[s] = hp.ref_code(p);
      compare_all($sformatf("t%0d", t));
    end
    // Parity error: ERROR seen on resp.
    hp.strobe(0, hp.with_parity(CODE) ^ 8'h01, TO, r, lat);
    check(r == R_ERROR && lat == SYNC + 2, $sformatf("corrupted byte: reply %0d after %0d", r, lat));
    merge_sweep('{ack_b_n: 1'b1, ack_sp_n: 1'b1, error_n: 1'b0}, "during ERROR");
    hp.wait_error_end(4 * EP, rel);
    merge_sweep(RESP_IDLE, "idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
