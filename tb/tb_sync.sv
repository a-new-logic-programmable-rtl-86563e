// tb_sync - self-checking test of the strobe synchronizer.
//
// Drives random levels into a 2-stage and a 3-stage synchronizer and checks
// that each output equals the input delayed by exactly STAGES clocks, and
// that reset clears the outputs.
module tb_sync;
  logic clk = 1'b0, reset = 1'b1, din = 1'b0;
  logic dout2, dout3;
  int   checks = 0, failures = 0;
  logic hist [$];

  always #5 clk = ~clk;

  sync #(.STAGES(2)) dut2 (.clk, .reset, .datain(din), .dataout(dout2));
  sync #(.STAGES(3)) dut3 (.clk, .reset, .datain(din), .dataout(dout3));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (dout2 !== 1'b0 || dout3 !== 1'b0) begin failures++; $display("FAIL: not cleared in reset"); end
    @(negedge clk) reset = 1'b0;
    din = 1'b0;
    for (int i = 0; i < 4; i++) hist.push_front(1'b0);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      din = 1'($urandom_range(0, 1));
      @(posedge clk);
      hist.push_front(din);
      #1;
      checks++;
      if (dout2 !== hist[1]) begin failures++; $display("FAIL cyc %0d: 2-stage %b exp %b", cyc, dout2, hist[1]); end
      checks++;
      if (dout3 !== hist[2]) begin failures++; $display("FAIL cyc %0d: 3-stage %b exp %b", cyc, dout3, hist[2]); end
      void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
