// adder: reconfigurable module that adds the two operands.
// Purely combinational: ans = in1 + in2, wrapped to W bits (no carry out),
// as the module's output port is as wide as its inputs. Width W defaults to the
// 4 bits of the original design. Result is valid in the same cycle.
module adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] ans
);

  always_comb ans = in1 + in2;

endmodule
