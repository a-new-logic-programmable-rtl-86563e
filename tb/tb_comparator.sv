// tb_comparator - exhaustive test of the identification code comparator.
//
// Applies every pair of 7-bit codes and checks equal against a bitwise
// comparison made here.
module tb_comparator;
  logic [6:0] board, dip;
  logic       equal;
  int checks = 0, failures = 0;

  comparator dut (.board, .dip, .equal);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 128; a++)
      for (int b = 0; b < 128; b++) begin
        logic same;
        board = 7'(a); dip = 7'(b);
        #1;
        same = 1'b1;
        for (int i = 0; i < 7; i++) if (board[i] != dip[i]) same = 1'b0;
        checks++;
        if (equal !== same) begin failures++; $display("FAIL: %b vs %b -> %b", board, dip, equal); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
