// latchio: the fixed region's interface module. It holds three W-bit registers:
// out1 takes the DIP switches when PB_RIGHT is pressed, out2 takes them when
// PB_ENTER is pressed, and res_out takes the result coming back from the
// reconfigurable region (res_in) when PB_UP is pressed and drives the LEDs.
// While PB_UP is held, the rs232io submodule is asked to send the byte 0x55 to
// the host, which is the request to reconfigure the other region (here, as in
// the original design, one request after every computation).
//
// Timing: buttons, switches and reset pass through two-flip-flop
// synchronisers; a register loads on the third clk edge after its button rises
// (two synchroniser stages, then the edge detector). The start bit of the
// request frame begins on that same third edge after PB_UP rises. reset (PB_DOWN, active high) clears
// all three registers and the transmitter.
//
// What the registers hold and which button loads which follows the original
// design. The synchronisers and the edge-triggered loads in the clk domain (the
// original used each push button as a clock), and clearing the registers on
// reset, are this design's choices.
module latchio
  import apr_pkg::*;
#(
  parameter int unsigned W      = OPER_W,
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic         clk_pin,
  input  logic         reset,
  input  logic [W-1:0] sw,
  input  logic         pb_up,
  input  logic         pb_right,
  input  logic         pb_enter,
  output logic [W-1:0] out1,
  output logic [W-1:0] out2,
  input  logic [W-1:0] res_in,
  output logic [W-1:0] res_out,
  input  logic         rd_pin,
  output logic         td_pin
);

  logic [W-1:0] sw_s;
  logic         rst_s, up_s, right_s, enter_s;
  logic         up_d, right_d, enter_d;
  logic         load_new_bit;
  logic [7:0]   status;

  sync2 #(.W(W + 4)) u_sync (
    .clk (clk_pin),
    .d   ({reset, pb_up, pb_right, pb_enter, sw}),
    .q   ({rst_s, up_s, right_s, enter_s, sw_s})
  );

  always_ff @(posedge clk_pin) begin
    if (rst_s) begin
      up_d    <= 1'b0;
      right_d <= 1'b0;
      enter_d <= 1'b0;
      out1    <= '0;
      out2    <= '0;
      res_out <= '0;
    end else begin
      up_d    <= up_s;
      right_d <= right_s;
      enter_d <= enter_s;
      if (right_s && !right_d) out1    <= sw_s;
      if (enter_s && !enter_d) out2    <= sw_s;
      if (up_s    && !up_d)    res_out <= res_in;
    end
  end

  // Request to the host: level of PB_UP, with the request byte while it is held.
  always_comb begin
    load_new_bit = up_s;
    status       = up_s ? RECONFIG_REQ_BYTE : 8'h00;
  end

  rs232io #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_communicator (
    .pin_sysclk    (clk_pin),
    .send_data     (load_new_bit),
    .statusdata    (status),
    .reset_pushbtn (rst_s),
    .pin_rs232_rd  (rd_pin),
    .pin_rs232_td  (td_pin)
  );

endmodule
