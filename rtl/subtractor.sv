// subtractor: the second reconfigurable module, same ports as the adder.
// Purely combinational: ans = in1 - in2, wrapped to W bits (no borrow out);
// in1 is the operand latched first (PB_RIGHT). The subtraction order and the
// wrap-around are this design's choice; the port shape (two 4-bit inputs, one
// 4-bit output) follows the original design.
module subtractor #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] ans
);

  always_comb ans = in1 - in2;

endmodule
