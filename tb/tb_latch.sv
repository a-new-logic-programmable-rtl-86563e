// tb_latch - self-checking test of the field latch.
//
// Applies random bytes with random enables and checks that the register
// loads only when enabled, that the three field views are bits 6..0, 6..3
// and 2..0 of the stored byte, and the byte layouts of the original design's
// examples (code 0001011, switch 0001 / position 011).
module tb_latch;
  import asm_pkg::*;
  logic clk = 1'b0, reset = 1'b1, enable = 1'b0;
  logic [6:0] data = '0, model = '0;
  logic [6:0] board;
  logic [3:0] switch_num;
  logic [2:0] position;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  latch dut (.clk, .reset, .enable, .data, .board, .switch_num, .position);

  task automatic expect_fields(input logic [6:0] b, input string tag);
    checks++;
    if (board !== b || switch_num !== {b[6], b[5], b[4], b[3]} || position !== {b[2], b[1], b[0]}) begin
      failures++;
      $display("FAIL %s: board %b sw %b pos %b, stored %b", tag, board, switch_num, position, b);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 expect_fields(7'b0, "reset");
    @(negedge clk) reset = 1'b0;
    // Example bytes: first byte 1_0001011, second byte 1_0001_011.
    data = 7'b0001011; enable = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (board !== 7'd11) begin failures++; $display("FAIL: code %0d exp 11", board); end
    checks++;
    if (switch_num !== 4'd1 || position !== 3'd3) begin failures++; $display("FAIL: sw %0d pos %0d exp 1/3", switch_num, position); end
    model = 7'b0001011;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      data   = 7'($urandom);
      enable = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (enable) model = data;
      #1 expect_fields(model, $sformatf("step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
