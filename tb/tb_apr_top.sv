// tb_apr_top: end-to-end run of the whole design at its default parameters
// (100 MHz clock, 9600 baud), with the testbench playing both the user at the
// board and the host PC.
//
// Each round: the user sets operand A on the switches and presses PB_RIGHT,
// sets B and presses PB_ENTER, then presses PB_UP; the LEDs must show A op B
// for the module now loaded, exactly three clocks after the press. PB_UP also
// sends the request byte; the host receives it from the serial line (checked
// to be 0x55 at 9600 baud) and answers by loading the other module, which is
// the partial reconfiguration. The LEDs must not change when it does. The user
// then presses PB_UP again without touching the operands: the LEDs must show
// the result of the newly loaded module from the operands the fixed region
// kept across the reconfiguration. That request in turn makes the host swap
// back. Operand pairs are chosen so that sums that wrap past 15 and
// differences that borrow both occur. Each mechanism is counted, and one that
// never happened counts as a failure.
module tb_apr_top;
  import apr_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int CPB = 100_000_000 / 9600;     // clocks per serial bit

  logic       clk = 1'b0;
  logic       pb_down, pb_right, pb_enter, pb_up, tx;
  logic [3:0] sw, led;
  rm_kind_e   rm;
  int         cyc = 0;
  int         checks = 0, failures = 0;

  // mechanism counters
  int n_reset = 0, n_op1 = 0, n_op2 = 0, n_result = 0, n_request = 0;
  int n_to_sub = 0, n_to_add = 0, n_kept = 0, n_wrap = 0, n_borrow = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  apr_top dut (
    .clk(clk), .pb_down(pb_down), .sw(sw), .pb_right(pb_right),
    .pb_enter(pb_enter), .pb_up(pb_up), .led(led),
    .rs232_rx_data(1'b1), .rs232_tx_data(tx), .rm_loaded(rm)
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic logic [3:0] model(rm_kind_e k, int a, int b);
    return (k == RM_ADDER) ? 4'((a + b) % 16) : 4'((a - b + 16) % 16);
  endfunction

  task automatic push(ref logic pb);
    @(negedge clk);
    pb = 1'b1;
    repeat (8) @(negedge clk);
    pb = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  // Host side: wait for a frame, decode it, return the byte.
  task automatic host_rx(output logic [7:0] b, output bit ok);
    ok = 1'b1;
    @(negedge clk iff tx == 1'b0);
    repeat (CPB / 2) @(negedge clk);
    if (tx !== 1'b0) ok = 1'b0;
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(negedge clk);
      b[i] = tx;
    end
    repeat (CPB) @(negedge clk);
    if (tx !== 1'b1) ok = 1'b0;
  endtask

  // PB_UP, LED timing check, request byte, host reconfigures.
  task automatic compute_and_request(int a, int b);
    logic [3:0] old_led, want;
    logic [7:0] rb;
    bit         ok;
    old_led = led;
    want    = model(rm, a, b);
    fork
      begin
        @(negedge clk);
        pb_up = 1'b1;
        repeat (2) @(negedge clk);
        chk(led == old_led, "LEDs hold until the third edge");
        @(negedge clk);
        chk(led == want, $sformatf("LEDs %0d, want %0d (rm=%0d a=%0d b=%0d)", led, want, rm, a, b));
        if (led == want) n_result++;
        repeat (5) @(negedge clk);
        pb_up = 1'b0;
      end
      begin
        host_rx(rb, ok);
        chk(ok && rb == RECONFIG_REQ_BYTE, $sformatf("request byte %02x", rb));
        if (ok && rb == RECONFIG_REQ_BYTE) n_request++;
      end
    join
    // Host loads the other module; the fixed region keeps running.
    old_led = led;
    rm = (rm == RM_ADDER) ? RM_SUBTRACTOR : RM_ADDER;
    if (rm == RM_SUBTRACTOR) n_to_sub++; else n_to_add++;
    repeat (20) @(negedge clk);
    chk(led == old_led, "LEDs unchanged by reconfiguration");
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pairs[6][2] = '{'{3, 4}, '{9, 8}, '{2, 7}, '{15, 15}, '{12, 5}, '{0, 1}};

    pb_down = 1'b1; pb_right = 1'b0; pb_enter = 1'b0; pb_up = 1'b0;
    sw = 4'h0; rm = RM_ADDER;
    repeat (6) @(negedge clk);
    pb_down = 1'b0;
    repeat (4) @(negedge clk);
    chk(led == 4'h0 && tx === 1'b1, "after reset: LEDs clear, line idle");
    if (led == 4'h0) n_reset++;

    foreach (pairs[i]) begin
      int a, b;
      a = pairs[i][0]; b = pairs[i][1];
      sw = 4'(a); push(pb_right); n_op1++;
      sw = 4'(b); push(pb_enter); n_op2++;
      sw = 4'($urandom);                          // switches wander afterwards
      if (rm == RM_ADDER && a + b > 15) n_wrap++;
      if (rm == RM_SUBTRACTOR && a < b) n_borrow++;
      compute_and_request(a, b);
      // Same operands, other module: they survived the reconfiguration.
      if (rm == RM_ADDER && a + b > 15) n_wrap++;
      if (rm == RM_SUBTRACTOR && a < b) n_borrow++;
      begin
        int n_before;
        n_before = n_result;
        compute_and_request(a, b);
        if (n_result == n_before + 1) n_kept++;
      end
    end

    $display("mechanisms: reset=%0d operand1=%0d operand2=%0d result=%0d request=%0d to_sub=%0d to_add=%0d kept_across_reconfig=%0d add_wrap=%0d sub_borrow=%0d",
             n_reset, n_op1, n_op2, n_result, n_request, n_to_sub, n_to_add, n_kept, n_wrap, n_borrow);
    checks++; if (n_reset   == 0) begin failures++; $display("FAIL reset never happened");     end
    checks++; if (n_op1     == 0) begin failures++; $display("FAIL no operand 1 latched");     end
    checks++; if (n_op2     == 0) begin failures++; $display("FAIL no operand 2 latched");     end
    checks++; if (n_result  == 0) begin failures++; $display("FAIL no result latched");        end
    checks++; if (n_request == 0) begin failures++; $display("FAIL no request sent");          end
    checks++; if (n_to_sub  == 0) begin failures++; $display("FAIL never reconfigured to subtractor"); end
    checks++; if (n_to_add  == 0) begin failures++; $display("FAIL never reconfigured to adder");      end
    checks++; if (n_kept    == 0) begin failures++; $display("FAIL operands never reused across reconfiguration"); end
    checks++; if (n_wrap    == 0) begin failures++; $display("FAIL no wrapping sum");          end
    checks++; if (n_borrow  == 0) begin failures++; $display("FAIL no borrowing difference");  end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
