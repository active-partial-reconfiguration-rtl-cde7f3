// tb_subtractor: exhaustive check of the 4-bit subtractor. Every one of the 256 operand
// pairs is applied and the output compared with (a - b) mod 16 computed in the
// testbench. A watchdog ends the run if it stalls.
module tb_subtractor;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic [3:0] in1, in2, ans;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  subtractor #(.W(4)) dut (.in1(in1), .in2(in2), .ans(ans));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        in1 = 4'(a); in2 = 4'(b);
        @(negedge clk);
        checks++;
        if (int'(ans) != (a - b + 16) % 16) begin
          failures++;
          $display("FAIL %0d - %0d: got %0d", a, b, ans);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
