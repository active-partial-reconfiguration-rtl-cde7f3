// tb_lut1: checks the one-input LUT for all four INIT values, with both input
// values, against INIT[i0]; then checks a cross-coupled pair (INIT 00 and 11,
// each fed by the other's output) settles to constant 0 and 1, the way the
// design uses it as a local ground and supply.
module tb_lut1;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       i0;
  logic [3:0] o;
  logic       gnd, vcc;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut1 #(.INIT(2'b00)) u0 (.i0(i0), .o(o[0]));
  lut1 #(.INIT(2'b01)) u1 (.i0(i0), .o(o[1]));
  lut1 #(.INIT(2'b10)) u2 (.i0(i0), .o(o[2]));
  lut1 #(.INIT(2'b11)) u3 (.i0(i0), .o(o[3]));

  lut1 #(.INIT(2'b00)) u_gnd (.i0(vcc), .o(gnd));
  lut1 #(.INIT(2'b11)) u_vcc (.i0(gnd), .o(vcc));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      i0 = n[0];
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        logic [1:0] init;
        init = 2'(k);
        checks++;
        if (o[k] != init[i0]) begin
          failures++;
          $display("FAIL INIT=%b i0=%b got %b", init, i0, o[k]);
        end
      end
    end
    checks++;
    if (gnd !== 1'b0 || vcc !== 1'b1) begin
      failures++;
      $display("FAIL constant pair gnd=%b vcc=%b", gnd, vcc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
