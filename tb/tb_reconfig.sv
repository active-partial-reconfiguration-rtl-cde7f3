// tb_reconfig: checks the reconfigurable region with each module loaded.
// For both values of rm_loaded, all 256 operand pairs are applied and the
// result is compared with the sum or difference modulo 16 computed in the
// testbench. The module is also switched back and forth with the operands held,
// to see the output follow the loaded module at once.
module tb_reconfig;
  import apr_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  rm_kind_e   rm;
  logic [3:0] in1, in2, ans;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  reconfig #(.W(4)) dut (.rm_loaded(rm), .in1(in1), .in2(in2), .ans(ans));

  function automatic int expect_of(rm_kind_e k, int a, int b);
    return (k == RM_ADDER) ? (a + b) % 16 : (a - b + 16) % 16;
  endfunction

  task automatic check(int a, int b);
    @(negedge clk);
    checks++;
    if (int'(ans) != expect_of(rm, a, b)) begin
      failures++;
      $display("FAIL rm=%0d a=%0d b=%0d got %0d", rm, a, b, ans);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      rm = rm_kind_e'(k);
      for (int a = 0; a < 16; a++)
        for (int b = 0; b < 16; b++) begin
          in1 = 4'(a); in2 = 4'(b);
          check(a, b);
        end
    end
    // Swap the loaded module with the operands held.
    in1 = 4'd3; in2 = 4'd9;
    for (int n = 0; n < 6; n++) begin
      rm = (rm == RM_ADDER) ? RM_SUBTRACTOR : RM_ADDER;
      check(3, 9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
