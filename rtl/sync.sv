// sync - brings one asynchronous host strobe (SB, SSP or YACK) into the
// board clock domain.
//
// A chain of STAGES flip-flops, all cleared by the asynchronous active-high
// reset. dataout follows datain STAGES clock edges later. The original design
// names this block and its purpose; the two-stage flip-flop chain is this
// design's choice.
module sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic reset,
  input  logic datain,
  output logic dataout
);

  logic [STAGES-1:0] stage_q;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) stage_q <= '0;
    else       stage_q <= {stage_q[STAGES-2:0], datain};
  end

  assign dataout = stage_q[STAGES-1];

  initial assert (STAGES >= 2) else $error("sync: STAGES must be at least 2");

endmodule
