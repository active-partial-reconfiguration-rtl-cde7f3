// reconfig: the reconfigurable region. On the FPGA this area holds exactly one
// computation module at a time (the adder or the subtractor) and is rewritten
// by a partial bitstream while the rest of the chip keeps working. In RTL both
// modules are instantiated and rm_loaded, which stands for the content of the
// region's configuration memory, decides which one drives the region's output.
// That selector is this design's modelling choice; the module set and the port
// widths follow the original design. Combinational, no clock.
module reconfig
  import apr_pkg::*;
#(
  parameter int unsigned W = OPER_W
) (
  input  rm_kind_e     rm_loaded,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] ans
);

  logic [W-1:0] ans_add, ans_sub;

  adder #(.W(W)) u_adder (
    .in1(in1), .in2(in2), .ans(ans_add)
  );

  subtractor #(.W(W)) u_subt (
    .in1(in1), .in2(in2), .ans(ans_sub)
  );

  always_comb begin
    unique case (rm_loaded)
      RM_ADDER:      ans = ans_add;
      RM_SUBTRACTOR: ans = ans_sub;
      default:       ans = ans_add;
    endcase
  end

endmodule
