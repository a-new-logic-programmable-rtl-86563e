// tb_controller - self-checking test of the handshake state machine.
//
// Drives the synchronized strobes, EQUAL and PARITY directly and checks,
// clock by clock: LATCH fires on the clock of each accepted strobe edge,
// ACK_B / ACK_SP go low two clocks after the strobe edge and stay low until
// a YACK edge, DECODE fires once for a clean switch/position byte, a
// non-matching code is ignored, a parity error gives an ERROR pulse of
// exactly ERR_PULSE clocks and returns the FSM to stand-by, and an SB while
// waiting for SSP restarts identification.
module tb_controller;
  localparam int EP = 5;
  logic clk = 1'b0, reset = 1'b1;
  logic sb = 0, ssp = 0, yack = 0, equal = 0, errorin = 0;
  logic latch, decode, errorout, ack_b, ack_sp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  controller #(.ERR_PULSE(EP)) dut (.clk, .reset, .sb, .ssp, .yack, .equal, .errorin,
                                    .latch, .decode, .errorout, .ack_b, .ack_sp);

  // Outputs sampled 1 ns after each rising clock edge.
  task automatic tick(); @(posedge clk); #1; endtask

  task automatic expect_out(input logic l, input logic d, input logic e, input logic ab,
                            input logic asp, input string tag);
    checks++;
    if ({latch, decode, errorout, ack_b, ack_sp} !== {l, d, e, ab, asp}) begin
      failures++;
      $display("FAIL %s: latch %b decode %b err_n %b ack_b_n %b ack_sp_n %b, exp %b %b %b %b %b",
               tag, latch, decode, errorout, ack_b, ack_sp, l, d, e, ab, asp);
    end
  endtask

  // Raise a strobe (1 ns after a clock edge) and check LATCH on this clock.
  task automatic strobe(ref logic s, input logic expect_latch, input string tag);
    s = 1'b1;
    #1;
    checks++;
    if (latch !== expect_latch) begin
      failures++; $display("FAIL %s: latch %b exp %b", tag, latch, expect_latch);
    end
    tick();
  endtask

  task automatic pulse_yack();
    yack = 1'b1; tick(); yack = 1'b0;
  endtask

  // Full select of this board: SB, ACK_B, YACK.
  task automatic select_board(input string tag);
    equal = 1'b1; errorin = 1'b0;
    strobe(sb, 1, tag);                    // edge seen: latch, -> CHECK_B
    sb = 1'b0;
    expect_out(0, 0, 1, 1, 1, {tag, " check"});
    tick();                                // CHECK_B -> ACK_B
    expect_out(0, 0, 1, 0, 1, {tag, " ack_b low"});
    repeat (3) begin tick(); expect_out(0, 0, 1, 0, 1, {tag, " ack_b held"}); end
    pulse_yack();                          // yack edge: -> WAIT_SSP
    expect_out(0, 0, 1, 1, 1, {tag, " ack_b released"});
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(); tick();
    expect_out(0, 0, 1, 1, 1, "reset");
    reset = 1'b0;
    tick();

    // 1. Non-matching board code: latched, then ignored.
    equal = 1'b0;
    strobe(sb, 1, "mismatch");
    sb = 1'b0;
    tick();
    repeat (5) begin tick(); expect_out(0, 0, 1, 1, 1, "mismatch silent"); end
    // Still in stand-by: an SSP is ignored.
    strobe(ssp, 0, "ssp in idle");
    ssp = 1'b0;
    repeat (4) begin tick(); expect_out(0, 0, 1, 1, 1, "ssp ignored"); end

    // 2. Full transaction.
    select_board("sel1");
    repeat (3) begin tick(); expect_out(0, 0, 1, 1, 1, "wait ssp"); end
    strobe(ssp, 1, "ssp1");
    ssp = 1'b0;
    expect_out(0, 1, 1, 1, 1, "decode pulse");
    tick();
    expect_out(0, 0, 1, 1, 0, "ack_sp low");
    repeat (3) begin tick(); expect_out(0, 0, 1, 1, 0, "ack_sp held"); end
    // Strobes other than YACK do not end ACK_SP.
    strobe(sb, 0, "sb during ack_sp"); sb = 1'b0;
    expect_out(0, 0, 1, 1, 0, "ack_sp held after sb");
    pulse_yack();
    expect_out(0, 0, 1, 1, 1, "ack_sp released");

    // 3. Parity error on SB with a matching code: ERROR for EP clocks.
    tick();
    equal = 1'b1; errorin = 1'b1;
    strobe(sb, 1, "perr sb");
    sb = 1'b0; errorin = 1'b0;
    tick();
    for (int i = 0; i < EP; i++) begin
      expect_out(0, 0, 0, 1, 1, $sformatf("error low %0d", i));
      tick();
    end
    expect_out(0, 0, 1, 1, 1, "error ended");
    // Back in stand-by: SSP ignored.
    strobe(ssp, 0, "ssp after error"); ssp = 1'b0;
    repeat (3) begin tick(); expect_out(0, 0, 1, 1, 1, "stand-by after error"); end

    // 4. Parity error on SSP of a selected board.
    select_board("sel2");
    errorin = 1'b1;
    strobe(ssp, 1, "perr ssp");
    ssp = 1'b0; errorin = 1'b0;
    expect_out(0, 0, 1, 1, 1, "no decode on error");
    tick();
    for (int i = 0; i < EP; i++) begin
      expect_out(0, 0, 0, 1, 1, $sformatf("ssp error low %0d", i));
      tick();
    end
    expect_out(0, 0, 1, 1, 1, "ssp error ended");

    // 5. SB while waiting for SSP re-runs identification; another board's code
    //    deselects this one.
    select_board("sel3");
    equal = 1'b0;
    strobe(sb, 1, "reselect other");
    sb = 1'b0;
    tick();
    repeat (3) begin tick(); expect_out(0, 0, 1, 1, 1, "deselected"); end
    strobe(ssp, 0, "ssp after deselect"); ssp = 1'b0;
    repeat (3) begin tick(); expect_out(0, 0, 1, 1, 1, "deselected ssp ignored"); end

    // 6. Held-high SB gives one acknowledge only (edge triggered).
    equal = 1'b1;
    strobe(sb, 1, "held sb");
    tick();
    expect_out(0, 0, 1, 0, 1, "held sb ack");
    pulse_yack();
    repeat (4) begin tick(); expect_out(0, 0, 1, 1, 1, "held sb once"); end
    sb = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
