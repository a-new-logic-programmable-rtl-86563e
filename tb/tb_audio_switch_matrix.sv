// tb_audio_switch_matrix - end-to-end test of the full console: 40 boards
// with 10 switches each, at the design's default parameters.
//
// Every board gets a distinct random identification code. The host model
// runs random two-byte transactions over the shared port and, after each,
// all 400 switch controls are compared with a model. The test makes each
// protocol mechanism happen and counts it:
//   select      - a board answers SB with ACK_B
//   update      - a switch takes a new position after SSP / ACK_SP
//   foreign     - an SB with a code no board has, ignored by all
//   sb_error    - a corrupted first byte, one merged ERROR pulse from all boards
//   ssp_error   - a corrupted second byte, ERROR from the selected board only
//   reselect    - SB to a second board while the first waits for SSP; only
//                 the second board may then move
//   range       - a switch number 10..15, acknowledged, nothing moves
// A mechanism that never happened counts as a failure. Reply and release
// latencies and the ERROR width are checked on every strobe, and at no time
// may two reply lines be low together.
module tb_audio_switch_matrix;
  import asm_pkg::*;
  localparam int NB = DEF_NUM_BOARDS;
  localparam int NSW = DEF_NUM_SWITCHES;
  localparam int SYNC = 2;
  localparam int EP = 8;
  localparam int TO = 40;
  localparam int R_NONE = 0, R_ACK_B = 1, R_ACK_SP = 2, R_ERROR = 3;
  localparam string RNAME [5] = '{"none", "ACK_B", "ACK_SP", "ERROR", "several"};

  typedef enum int {M_SELECT, M_UPDATE, M_FOREIGN, M_SB_ERROR, M_SSP_ERROR, M_RESELECT, M_RANGE, M_COUNT} mech_t;

  logic clk = 1'b0, rst = 1'b1;
  host_cmd_t   cmd;
  board_resp_t resp;
  logic [ID_W-1:0] dip [NB];
  sw_ctrl_t    sw_ctrl [NB][NSW];
  logic [3:0]  model [NB][NSW];
  bit          used [128];
  int          mech [M_COUNT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  host_port_if hp (clk);

  assign cmd = '{sb: hp.sb, ssp: hp.ssp, yack: hp.yack, data: hp.data};
  assign hp.ack_b_n  = resp.ack_b_n;
  assign hp.ack_sp_n = resp.ack_sp_n;
  assign hp.error_n  = resp.error_n;

  audio_switch_matrix dut (.clk, .rst, .cmd, .dip_switch(dip), .resp, .sw_ctrl);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic compare_all(input string tag);
    int bad = 0;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < NSW; i++)
        if (sw_ctrl[b][i] !== model[b][i]) begin
          if (bad < 5) $display("  %s: board %0d SW%0d = %b exp %b", tag, b, i, sw_ctrl[b][i], model[b][i]);
          bad++;
        end
    check(bad == 0, $sformatf("%s: %0d switch controls differ", tag, bad));
  endtask

  task automatic step(input bit is_ssp, input logic [7:0] b, input int exp, input string tag);
    int r, lat, rel;
    hp.strobe(is_ssp, b, TO, r, lat);
    check(r == exp, $sformatf("%s: reply %s exp %s", tag, RNAME[r], RNAME[exp]));
    if (exp != R_NONE)
      check(lat == SYNC + 2, $sformatf("%s: reply after %0d clocks exp %0d", tag, lat, SYNC + 2));
    if (r == R_ACK_B || r == R_ACK_SP) begin
      hp.send_yack(TO, rel);
      check(rel == SYNC + 1, $sformatf("%s: release after %0d clocks exp %0d", tag, rel, SYNC + 1));
    end else if (r == R_ERROR) begin
      hp.wait_error_end(4 * EP, rel);
      check(rel == EP, $sformatf("%s: ERROR low %0d clocks exp %0d", tag, rel, EP));
    end else begin
      repeat (6) @(posedge clk);
    end
  endtask

  function automatic logic [6:0] foreign_code();
    logic [6:0] c;
    do c = 7'($urandom); while (used[c]);
    return c;
  endfunction

  // Reply lines are one-hot-or-idle at every clock.
  always @(posedge clk) if (!rst) begin
    checks++;
    if ((!resp.ack_b_n + !resp.ack_sp_n + !resp.error_n) > 1) begin
      failures++; $display("FAIL: several reply lines low: %b", resp);
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      automatic logic [6:0] c;
      do c = 7'($urandom); while (used[c]);
      used[c] = 1'b1;
      dip[b] = c;
      for (int i = 0; i < NSW; i++) model[b][i] = 4'b0000;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    compare_all("after reset");

    for (int t = 0; t < 400; t++) begin
      automatic int kind = (t < 7) ? t : $urandom_range(0, 11);
      automatic int tb_ = $urandom_range(0, NB - 1);
      automatic int s = $urandom_range(0, NSW - 1), p = $urandom_range(0, 7);
      automatic logic [7:0] b2 = hp.with_parity({4'(s), 3'(p)});
      automatic string tag = $sformatf("t%0d", t);
      case (kind)
        0, 7, 8, 9, 10, 11: begin   // plain transaction
          step(0, hp.with_parity(dip[tb_]), R_ACK_B, {tag, " select"}); mech[M_SELECT]++;
          step(1, b2, R_ACK_SP, {tag, " switch"}); mech[M_UPDATE]++;
          model[tb_][s] = hp.ref_code(p);
        end
        1: begin                    // code of no board
          step(0, hp.with_parity(foreign_code()), R_NONE, {tag, " foreign"}); mech[M_FOREIGN]++;
          step(1, b2, R_NONE, {tag, " SSP after foreign"});
        end
        2: begin                    // corrupted first byte
          automatic logic [7:0] b1 = hp.with_parity(dip[tb_]);
          b1[$urandom_range(0, 7)] ^= 1'b1;
          step(0, b1, R_ERROR, {tag, " corrupted SB"}); mech[M_SB_ERROR]++;
          step(1, b2, R_NONE, {tag, " SSP after error"});
        end
        3: begin                    // corrupted second byte
          step(0, hp.with_parity(dip[tb_]), R_ACK_B, {tag, " select"}); mech[M_SELECT]++;
          b2[$urandom_range(0, 7)] ^= 1'b1;
          step(1, b2, R_ERROR, {tag, " corrupted SSP"}); mech[M_SSP_ERROR]++;
        end
        4: begin                    // reselect another board before SSP
          automatic int other = (tb_ + 1 + $urandom_range(0, NB - 2)) % NB;
          step(0, hp.with_parity(dip[tb_]), R_ACK_B, {tag, " select first"}); mech[M_SELECT]++;
          step(0, hp.with_parity(dip[other]), R_ACK_B, {tag, " select second"}); mech[M_SELECT]++;
          step(1, b2, R_ACK_SP, {tag, " switch on second"}); mech[M_UPDATE]++; mech[M_RESELECT]++;
          model[other][s] = hp.ref_code(p);
        end
        5: begin                    // switch number out of range
          automatic int sr = $urandom_range(NSW, 15);
          step(0, hp.with_parity(dip[tb_]), R_ACK_B, {tag, " select"}); mech[M_SELECT]++;
          step(1, hp.with_parity({4'(sr), 3'(p)}), R_ACK_SP, {tag, " switch out of range"}); mech[M_RANGE]++;
        end
        default: begin              // two commands in a row to one board
          step(0, hp.with_parity(dip[tb_]), R_ACK_B, {tag, " select"}); mech[M_SELECT]++;
          step(1, b2, R_ACK_SP, {tag, " switch"}); mech[M_UPDATE]++;
          model[tb_][s] = hp.ref_code(p);
          step(0, hp.with_parity(dip[tb_]), R_ACK_B, {tag, " select again"}); mech[M_SELECT]++;
          step(1, hp.with_parity({4'(s), 3'(7 - p)}), R_ACK_SP, {tag, " switch again"}); mech[M_UPDATE]++;
          model[tb_][s] = hp.ref_code(7 - p);
        end
      endcase
      compare_all(tag);
    end

    for (int m = 0; m < M_COUNT; m++) begin
      automatic mech_t mm = mech_t'(m);
      $display("mechanism %-12s happened %0d times", mm.name(), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mm.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
