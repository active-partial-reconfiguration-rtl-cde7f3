// sync2: two-flip-flop synchroniser, one per bit, that brings asynchronous
// board inputs (push buttons, DIP switches) into the clk domain. Output q
// follows input d two rising clk edges later. The flip-flops have no reset:
// whatever they hold is flushed after two cycles, which any reset held for at
// least three cycles covers. This is this design's own addition; the original
// clocked its registers straight from the push buttons.
module sync2 #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end

endmodule
