// tb_bm_4b_v2p: checks the bus macro in the three ways the design uses a line:
// left side driving with the right side off, right side driving with the left
// side off, and neither driving (reads 0). Random data and random per-bit
// choices of driver are compared with a reference model of the line.
module tb_bm_4b_v2p;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic [3:0] li, lt, ri, rt, o;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  bm_4b_v2p #(.W(4)) dut (.li(li), .lt(lt), .ri(ri), .rt(rt), .o(o));

  task automatic check();
    logic [3:0] exp;
    @(negedge clk);
    for (int b = 0; b < 4; b++)
      exp[b] = !lt[b] ? li[b] : (!rt[b] ? ri[b] : 1'b0);
    checks++;
    if (o != exp) begin
      failures++;
      $display("FAIL li=%b lt=%b ri=%b rt=%b: got %b want %b", li, lt, ri, rt, o, exp);
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
    // Left to right, as for the result bus.
    for (int n = 0; n < 100; n++) begin
      li = 4'($urandom); ri = 4'($urandom); lt = 4'h0; rt = 4'hf;
      check();
    end
    // Right to left, as for the operand buses.
    for (int n = 0; n < 100; n++) begin
      li = 4'($urandom); ri = 4'($urandom); lt = 4'hf; rt = 4'h0;
      check();
    end
    // Mixed per bit, never both sides on one line.
    for (int n = 0; n < 200; n++) begin
      li = 4'($urandom); ri = 4'($urandom); lt = 4'($urandom);
      rt = ~lt | 4'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
