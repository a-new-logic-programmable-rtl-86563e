// tb_board_logic - end-to-end test of one board's programmable logic at
// the parallel-port pins.
//
// A host model (host_port_if) runs the two-byte handshake. The test replays
// the three protocol examples of the design description: the identification
// code 0000000 sequence (a foreign code ignored, a parity error reported,
// switch 0 to position 3, switch 6 to position 6, switch 0 to position 0),
// the code 0001111 transaction selecting switch 1 position 5, and the
// corrupted byte 10001111. It then runs random transactions with random
// codes, parity errors and switch numbers and compares all ten switch
// controls with a model after each. Reply latency (strobe edge to reply:
// SYNC_STAGES + 2 clocks), release latency (YACK edge to release:
// SYNC_STAGES + 1 clocks) and the ERROR pulse width are checked each time.
module tb_board_logic;
  import asm_pkg::*;
  localparam int NSW = 10;
  localparam int SYNC = 2;
  localparam int EP = 8;
  localparam int TO = 40;

  logic clk = 1'b0, rst = 1'b1;
  logic [6:0] dip = 7'd0;
  sw_ctrl_t sw_ctrl [NSW];
  logic [3:0] model [NSW];
  int checks = 0, failures = 0;
  localparam int R_NONE = 0, R_ACK_B = 1, R_ACK_SP = 2, R_ERROR = 3;
  localparam string RNAME [5] = '{"none", "ACK_B", "ACK_SP", "ERROR", "several"};

  always #5 clk = ~clk;

  host_port_if hp (clk);

  board_logic dut (
    .clk, .rst, .sb(hp.sb), .ssp(hp.ssp), .yack(hp.yack), .data(hp.data),
    .dip_switch(dip), .ack_b_n(hp.ack_b_n), .ack_sp_n(hp.ack_sp_n),
    .error_n(hp.error_n), .sw_ctrl
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic compare_all(input string tag);
    for (int i = 0; i < NSW; i++)
      check(sw_ctrl[i] === model[i], $sformatf("%s: SW%0d = %b exp %b", tag, i, sw_ctrl[i], model[i]));
  endtask

  // One strobe with its expected outcome, finished as the host would.
  task automatic step(input bit is_ssp, input logic [7:0] b, input int exp, input string tag);
    int r;
    int lat, rel;
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

  task automatic reset_with(input logic [6:0] code);
    @(negedge clk);
    rst = 1'b1; dip = code;
    for (int i = 0; i < NSW; i++) model[i] = 4'b0000;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    compare_all("after reset");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // --- Identification code 0000000 sequence ---
    reset_with(7'b0000000);
    step(0, 8'b0_0000011, R_NONE,   "foreign code 0000011");
    compare_all("foreign code");
    step(0, 8'b0_1000000, R_ERROR,  "parity error on 1000000");
    step(0, 8'b0_0000000, R_ACK_B,  "select 0000000");
    step(1, 8'b0_0000_011, R_ACK_SP, "switch 0 position 3");
    model[0] = 4'b0100;
    compare_all("SW0 = 0100");
    step(0, 8'b0_0000000, R_ACK_B,  "select 0000000 again");
    step(1, 8'b0_0110_110, R_ACK_SP, "switch 6 position 6");
    model[6] = 4'b1001;
    compare_all("SW6 = 1001");
    step(0, 8'b0_0000000, R_ACK_B,  "select 0000000 third");
    step(1, 8'b0_0000_000, R_ACK_SP, "switch 0 position 0");
    model[0] = 4'b0111;
    compare_all("SW0 = 0111");

    // --- Identification code 0001111 transaction ---
    reset_with(7'b0001111);
    step(0, 8'b00001111, R_ACK_B,  "select 0001111");
    step(1, 8'b10001101, R_ACK_SP, "switch 1 position 5");
    model[1] = hp.ref_code(5);
    compare_all("SW1 position 5");
    // Corrupted byte 10001111: ERROR, board back in stand-by.
    step(0, 8'b10001111, R_ERROR,  "corrupted 10001111");
    step(1, 8'b10001101, R_NONE,   "SSP after error is ignored");
    compare_all("after error");

    // --- Random transactions ---
    reset_with(7'($urandom));
    for (int t = 0; t < 300; t++) begin
      automatic int kind = $urandom_range(0, 9);
      automatic logic [6:0] code = (kind < 7) ? dip : 7'($urandom);
      automatic int s = $urandom_range(0, 15), p = $urandom_range(0, 7);
      automatic logic [7:0] b1 = hp.with_parity(code);
      automatic logic [7:0] b2 = hp.with_parity({4'(s), 3'(p)});
      if (kind == 7) b1[$urandom_range(0, 7)] ^= 1'b1;        // corrupt first byte
      if (kind == 8) b2[$urandom_range(0, 7)] ^= 1'b1;        // corrupt second byte
      if (kind == 7) begin
        step(0, b1, R_ERROR, $sformatf("t%0d corrupted SB", t));
      end else if (code != dip) begin
        step(0, b1, R_NONE, $sformatf("t%0d foreign code", t));
      end else begin
        step(0, b1, R_ACK_B, $sformatf("t%0d select", t));
        if (kind == 8) step(1, b2, R_ERROR, $sformatf("t%0d corrupted SSP", t));
        else begin
          step(1, b2, R_ACK_SP, $sformatf("t%0d switch %0d position %0d", t, s, p));
          if (s < NSW) model[s] = hp.ref_code(p);
        end
      end
      compare_all($sformatf("t%0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
