// tb_rs232io: checks the request transmitter at 16 clocks per bit.
// A reference receiver in the testbench samples the line in the middle of each
// bit and checks start bit, eight data bits LSB first and stop bit. Also
// checked: the start bit begins on the clock edge that sees send_data rise; a
// level held high sends only one frame; a request during a frame is held and
// sent right after it (one idle clock between frames); a second extra request
// in the same frame is dropped; reset returns the line to idle at once.
module tb_rs232io;
  timeunit 1ns; timeprecision 1ps;

  localparam int CLK_HZ = 160;
  localparam int BAUD   = 10;
  localparam int CPB    = CLK_HZ / BAUD;   // 16

  logic       clk = 1'b0;
  logic       send, rst, td;
  logic [7:0] data;
  int         cyc = 0;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  rs232io #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (
    .pin_sysclk(clk), .send_data(send), .statusdata(data),
    .reset_pushbtn(rst), .pin_rs232_rd(1'b1), .pin_rs232_td(td)
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // Wait for a start bit, at most `limit` cycles; return its first cycle.
  task automatic wait_start(int limit, output int start, output bit seen);
    seen = 1'b0;
    start = -1;
    for (int n = 0; n < limit; n++) begin
      @(negedge clk);
      if (td == 1'b0) begin
        seen = 1'b1;
        start = cyc;
        return;
      end
    end
  endtask

  // Receive the rest of a frame whose start bit has just been seen.
  task automatic rx_rest(output logic [7:0] b, output bit framing_ok);
    framing_ok = 1'b1;
    repeat (CPB / 2 - 1) @(negedge clk);
    if (td !== 1'b0) framing_ok = 1'b0;          // middle of start bit
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(negedge clk);
      b[i] = td;
    end
    repeat (CPB) @(negedge clk);
    if (td !== 1'b1) framing_ok = 1'b0;          // middle of stop bit
  endtask

  task automatic request(logic [7:0] v, int hold);
    @(negedge clk);
    send = 1'b1; data = v;
    repeat (hold) @(negedge clk);
    send = 1'b0; data = 8'h00;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int         st, st2, rise_cyc;
    bit         seen, fok;
    logic [7:0] b;
    logic [7:0] vals[4] = '{8'h55, 8'hA3, 8'h01, 8'hFE};

    send = 1'b0; data = 8'h00; rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    chk(td === 1'b1, "line idles high after reset");

    // Single frames, request level held for many cycles.
    foreach (vals[k]) begin
      @(negedge clk);
      send = 1'b1; data = vals[k];
      rise_cyc = cyc + 1;                        // first edge that sees it
      wait_start(5, st, seen);
      chk(seen && st == rise_cyc, $sformatf("start bit on the edge after the rise (got %0d want %0d)", st, rise_cyc));
      repeat (3) @(negedge clk);
      send = 1'b0; data = 8'h00;
      rx_rest(b, fok);
      chk(fok, "start and stop bits");
      chk(b == vals[k], $sformatf("data %02x want %02x", b, vals[k]));
      // Stop bit must last a full bit then the line stays idle.
      wait_start(3 * CPB, st2, seen);
      chk(!seen, "no second frame from one request");
    end

    // Back-to-back: request during a frame is held; a third one is dropped.
    @(negedge clk);
    send = 1'b1; data = 8'h3C;
    wait_start(5, st, seen);
    chk(seen, "first of pair starts");
    fork
      rx_rest(b, fok);
      begin
        @(negedge clk); send = 1'b0;
        repeat (3 * CPB) @(negedge clk);
        request(8'hC5, 2);                       // held
        repeat (CPB) @(negedge clk);
        request(8'h77, 2);                       // dropped
      end
    join
    chk(fok && b == 8'h3C, "first of pair");
    wait_start(3 * CPB, st2, seen);
    chk(seen && st2 == st + 10 * CPB + 1, $sformatf("held frame follows after one idle cycle (%0d vs %0d)", st2, st + 10 * CPB + 1));
    rx_rest(b, fok);
    chk(fok && b == 8'hC5, $sformatf("held request byte %02x", b));
    wait_start(12 * CPB, st2, seen);
    chk(!seen, "third request was dropped");

    // Reset in the middle of a frame.
    request(8'h00, 2);
    repeat (3 * CPB) @(negedge clk);
    chk(td === 1'b0, "frame of 0x00 in progress");
    rst = 1'b1;
    @(negedge clk);
    chk(td === 1'b1, "reset returns line to idle");
    rst = 1'b0;
    wait_start(12 * CPB, st2, seen);
    chk(!seen, "nothing sent after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
