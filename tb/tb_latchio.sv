// tb_latchio: checks the fixed interface module at 16 clocks per serial bit.
// Buttons are pressed between clock edges; each register must keep its old
// value up to the second edge and show the new one from the third edge on.
// Also checked: operand 1 loads only on PB_RIGHT, operand 2 only on PB_ENTER,
// the LED register only on PB_UP; switches that change while a button is held
// are not taken; PB_UP starts a serial frame carrying 0x55 on that same third
// edge; reset clears the registers.
module tb_latchio;
  timeunit 1ns; timeprecision 1ps;

  localparam int CLK_HZ = 160;
  localparam int BAUD   = 10;
  localparam int CPB    = CLK_HZ / BAUD;

  logic       clk = 1'b0;
  logic       reset, pb_up, pb_right, pb_enter, td;
  logic [3:0] sw, out1, out2, res_in, res_out;
  int         cyc = 0;
  int         checks = 0, failures = 0;
  logic [3:0] e1, e2, er;                        // expected register values

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  latchio #(.W(4), .CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (
    .clk_pin(clk), .reset(reset), .sw(sw), .pb_up(pb_up), .pb_right(pb_right),
    .pb_enter(pb_enter), .out1(out1), .out2(out2), .res_in(res_in),
    .res_out(res_out), .rd_pin(1'b1), .td_pin(td)
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic chk_regs(string when);
    chk(out1 == e1 && out2 == e2 && res_out == er,
        $sformatf("%s: out1=%h out2=%h res=%h want %h %h %h", when, out1, out2, res_out, e1, e2, er));
  endtask

  // Press one button (0 right, 1 enter, 2 up) for `hold` cycles; check that
  // the registers change exactly on the third edge.
  task automatic press(int which, logic [3:0] new_val, int hold);
    logic [3:0] n1, n2, nr;
    n1 = e1; n2 = e2; nr = er;
    case (which)
      0: n1 = new_val;
      1: n2 = new_val;
      default: nr = new_val;
    endcase
    @(negedge clk);
    case (which)
      0: pb_right = 1'b1;
      1: pb_enter = 1'b1;
      default: pb_up = 1'b1;
    endcase
    repeat (2) @(negedge clk);
    chk_regs("two edges after press");
    @(negedge clk);
    e1 = n1; e2 = n2; er = nr;
    chk_regs("three edges after press");
    repeat (hold) @(negedge clk);
    pb_right = 1'b0; pb_enter = 1'b0; pb_up = 1'b0;
    repeat (4) @(negedge clk);
    chk_regs("after release");
  endtask

  task automatic rx_byte(output logic [7:0] b, output bit ok);
    ok = 1'b1;
    repeat (CPB / 2 - 1) @(negedge clk);
    if (td !== 1'b0) ok = 1'b0;
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(negedge clk);
      b[i] = td;
    end
    repeat (CPB) @(negedge clk);
    if (td !== 1'b1) ok = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    bit         ok;
    int         t_press;

    reset = 1'b1; pb_up = 1'b0; pb_right = 1'b0; pb_enter = 1'b0;
    sw = 4'h0; res_in = 4'h0;
    repeat (5) @(negedge clk);
    reset = 1'b0;
    repeat (4) @(negedge clk);
    e1 = 4'h0; e2 = 4'h0; er = 4'h0;
    chk_regs("after reset");
    chk(td === 1'b1, "serial line idle");

    for (int n = 0; n < 6; n++) begin
      logic [3:0] a, c, r;
      a = 4'($urandom); c = 4'($urandom); r = 4'($urandom);
      sw = a;
      press(0, a, 3);
      sw = c;                                    // no button: nothing loads
      repeat (5) @(negedge clk);
      chk_regs("switches change without a button");
      press(1, c, 3);
      res_in = r;
      t_press = cyc;
      fork
        press(2, r, 2 + n);
        begin
          // Start bit on the third edge after PB_UP.
          @(negedge clk);
          @(negedge clk iff td == 1'b0);
          chk(cyc == t_press + 4, $sformatf("request start at %0d want %0d", cyc, t_press + 4));
          rx_byte(b, ok);
          chk(ok && b == 8'h55, $sformatf("request byte %02x", b));
        end
      join
      res_in = ~r;                               // result changes, LEDs hold
      repeat (3) @(negedge clk);
      chk_regs("result changes without PB_UP");
    end

    // A held button takes the switches once, at its press.
    sw = 4'h9;
    @(negedge clk); pb_right = 1'b1;
    repeat (6) @(negedge clk);
    sw = 4'h6;
    repeat (6) @(negedge clk);
    pb_right = 1'b0;
    repeat (4) @(negedge clk);
    e1 = 4'h9;
    chk_regs("held button loads once");

    // Reset clears the registers.
    reset = 1'b1;
    repeat (4) @(negedge clk);
    reset = 1'b0;
    repeat (4) @(negedge clk);
    e1 = 4'h0; e2 = 4'h0; er = 4'h0;
    chk_regs("second reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
