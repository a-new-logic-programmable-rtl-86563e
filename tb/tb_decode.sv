// tb_decode - self-checking test of the switch control decoder.
//
// First reproduces the three results of the original design's simulation (switch
// 0 to position 3 gives 0100, switch 6 to position 6 gives 1001, switch 0
// to position 0 gives 0111), then applies random commands, including
// switch numbers 10..15 that must change nothing, and checks all ten
// control registers against a model. The expected code comes from a table
// written out here: positions 0..7 give 0111 0110 0101 0100 1011 1010
// 1001 1000.
module tb_decode;
  import asm_pkg::*;
  localparam int N = 10;
  logic clk = 1'b0, reset = 1'b1, enable = 1'b0;
  logic [3:0] switch_num = '0;
  logic [2:0] position = '0;
  sw_ctrl_t sw_ctrl [N];
  logic [3:0] model [N];
  int checks = 0, failures = 0;

  localparam logic [3:0] CODE [8] = '{4'b0111, 4'b0110, 4'b0101, 4'b0100,
                                      4'b1011, 4'b1010, 4'b1001, 4'b1000};

  always #5 clk = ~clk;

  decode dut (.clk, .reset, .enable, .switch_num, .position, .sw_ctrl);

  task automatic compare_all(input string tag);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sw_ctrl[i] !== model[i]) begin
        failures++; $display("FAIL %s: SW%0d = %b exp %b", tag, i, sw_ctrl[i], model[i]);
      end
    end
  endtask

  task automatic command(input int s, input int p);
    @(negedge clk);
    switch_num = 4'(s); position = 3'(p); enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    if (s < N) model[s] = CODE[p];
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) model[i] = 4'b0000;
    repeat (2) @(posedge clk);
    #1 compare_all("reset");
    @(negedge clk) reset = 1'b0;
    command(0, 3); compare_all("SW0 pos 3");
    checks++; if (sw_ctrl[0] !== 4'b0100) begin failures++; $display("FAIL: SW0 %b exp 0100", sw_ctrl[0]); end
    command(6, 6); compare_all("SW6 pos 6");
    checks++; if (sw_ctrl[6] !== 4'b1001) begin failures++; $display("FAIL: SW6 %b exp 1001", sw_ctrl[6]); end
    command(0, 0); compare_all("SW0 pos 0");
    checks++; if (sw_ctrl[0] !== 4'b0111) begin failures++; $display("FAIL: SW0 %b exp 0111", sw_ctrl[0]); end
    // Enable low: inputs change, nothing may move.
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      switch_num = 4'($urandom); position = 3'($urandom);
      @(posedge clk); #1 compare_all("idle");
    end
    for (int i = 0; i < 2000; i++) begin
      command($urandom_range(0, 15), $urandom_range(0, 7));
      compare_all($sformatf("cmd %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
