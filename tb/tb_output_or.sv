// tb_output_or - exhaustive test of the active-low reply merge.
//
// For all 64 combinations of this board's and the chain's replies, each
// merged line must be low exactly when at least one of its two inputs is
// low.
module tb_output_or;
  import asm_pkg::*;
  board_resp_t own, from_next, merged;
  int checks = 0, failures = 0;

  output_or dut (.own, .from_next, .merged);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      own = board_resp_t'(v[2:0]); from_next = board_resp_t'(v[5:3]);
      #1;
      checks++;
      if (merged.ack_b_n !== ((own.ack_b_n == 1'b0 || from_next.ack_b_n == 1'b0) ? 1'b0 : 1'b1)) begin
        failures++; $display("FAIL ack_b %b %b -> %b", own, from_next, merged);
      end
      checks++;
      if (merged.ack_sp_n !== ((own.ack_sp_n == 1'b0 || from_next.ack_sp_n == 1'b0) ? 1'b0 : 1'b1)) begin
        failures++; $display("FAIL ack_sp %b %b -> %b", own, from_next, merged);
      end
      checks++;
      if (merged.error_n !== ((own.error_n == 1'b0 || from_next.error_n == 1'b0) ? 1'b0 : 1'b1)) begin
        failures++; $display("FAIL error %b %b -> %b", own, from_next, merged);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
