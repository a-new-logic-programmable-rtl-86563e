// tb_parity - exhaustive test of the parity checker.
//
// Every byte value is applied; the error flag must be set exactly when the
// byte has an odd number of ones (counted bit by bit here). The original design's
// example bytes are also checked by name.
module tb_parity;
  logic [7:0] d;
  logic       perr;
  int checks = 0, failures = 0;

  parity dut (.d, .parity_err(perr));

  function automatic int ones(input logic [7:0] b);
    int n = 0;
    for (int i = 0; i < 8; i++) if (b[i]) n++;
    return n;
  endfunction

  task automatic expect_err(input logic [7:0] b, input logic e);
    d = b;
    #1;
    checks++;
    if (perr !== e) begin failures++; $display("FAIL: %b -> %b exp %b", b, perr, e); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_err(8'b10001111, 1'b1);  // corrupted byte of the error example
    expect_err(8'b00001111, 1'b0);  // board code example
    expect_err(8'b10001101, 1'b0);  // switch/position example
    expect_err(8'b10001011, 1'b0);  // byte layout example
    for (int v = 0; v < 256; v++) expect_err(8'(v), 1'((ones(8'(v)) % 2) == 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
