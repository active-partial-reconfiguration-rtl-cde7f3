// apr_top: an actively partially reconfigurable calculator. The chip is split
// into a fixed region, which keeps working at all times, and a reconfigurable
// region whose contents (an adder or a subtractor) can be swapped by a partial
// bitstream without stopping the fixed region.
//
// Fixed region: latchio latches two 4-bit operands from the DIP switches
// (PB_RIGHT, PB_ENTER), latches the result onto the LEDs (PB_UP) and, on PB_UP,
// sends the byte 0x55 over RS-232 so that the host knows to load the next
// module. Reconfigurable region: reconfig computes from the two operands.
// Every signal that crosses between the regions goes through a bus macro
// (bm_4b_v2p): busmacro1 carries the result from the left (reconfigurable)
// side to the right (fixed) side, busmacro2 and busmacro3 carry the operands
// the other way. The enables and dummy data of each bus-macro side come from a
// pair of constant LUTs placed in that side's own region (fake GND and VCC), so
// no constant net crosses the boundary. A third pair belongs to the fixed
// region's bus-macro area, as in the original floorplan, and is not used.
// Each pair feeds its outputs back into each other's input, as the original
// did so that each constant is a real LUT cell locked in its region rather than
// a tie-off the tools would move. Lint tools report this as a combinational
// loop; it stands on purpose, and it is harmless because each LUT's contents
// make its output constant whatever its input, so the loop cannot oscillate.
//
// rm_loaded stands for the configuration memory of the reconfigurable region:
// it tells which module is currently loaded. Changing it is the partial
// reconfiguration; the fixed region's registers keep their values across it.
// The structure, instance names, pin functions and the 100 MHz clock follow the
// original design; rm_loaded and the default 9600 baud are this design's own.
//
// Timing: one clock, clk. Button to register or to start of the request frame:
// 3 clk cycles. A request frame lasts 10 * CLK_HZ / BAUD cycles.
module apr_top
  import apr_pkg::*;
#(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic              clk,
  input  logic              pb_down,
  input  logic [OPER_W-1:0] sw,
  input  logic              pb_right,
  input  logic              pb_enter,
  input  logic              pb_up,
  output logic [OPER_W-1:0] led,
  input  logic              rs232_rx_data,
  output logic              rs232_tx_data,
  input  rm_kind_e          rm_loaded
);

  logic [OPER_W-1:0] oper1, oper2, ans;              // fixed-region side
  logic [OPER_W-1:0] oper_rec1, oper_rec2, ans_rec;  // reconfigurable side
  logic ffake_gnd, ffake_vcc, rfake_gnd, rfake_vcc, fmux_gnd, fmux_vcc;

  // ---- constant sources, one pair per area ----
  lut1 #(.INIT(2'b00)) internal_gnd_mux (.i0(fmux_vcc), .o(fmux_gnd));
  lut1 #(.INIT(2'b11)) internal_vcc_mux (.i0(fmux_gnd), .o(fmux_vcc));

  lut1 #(.INIT(2'b00)) internal_gnd_fix (.i0(ffake_vcc), .o(ffake_gnd));
  lut1 #(.INIT(2'b11)) internal_vcc_fix (.i0(ffake_gnd), .o(ffake_vcc));

  lut1 #(.INIT(2'b00)) internal_gnd_reco (.i0(rfake_vcc), .o(rfake_gnd));
  lut1 #(.INIT(2'b11)) internal_vcc_reco (.i0(rfake_gnd), .o(rfake_vcc));

  // ---- fixed module ----
  latchio #(.W(OPER_W), .CLK_HZ(CLK_HZ), .BAUD(BAUD)) take (
    .clk_pin  (clk),
    .reset    (pb_down),
    .sw       (sw),
    .pb_up    (pb_up),
    .pb_right (pb_right),
    .pb_enter (pb_enter),
    .out1     (oper1),
    .out2     (oper2),
    .res_in   (ans),
    .res_out  (led),
    .rd_pin   (rs232_rx_data),
    .td_pin   (rs232_tx_data)
  );

  // ---- reconfigurable module ----
  reconfig #(.W(OPER_W)) reconfig (
    .rm_loaded (rm_loaded),
    .in1       (oper_rec1),
    .in2       (oper_rec2),
    .ans       (ans_rec)
  );

  // ---- bus macros: left side reconfigurable, right side fixed ----
  // Result, left to right: left side drives, right side is off.
  bm_4b_v2p #(.W(OPER_W)) busmacro1 (
    .li (ans_rec),
    .lt ({OPER_W{rfake_gnd}}),
    .ri ({OPER_W{ffake_gnd}}),
    .rt ({OPER_W{ffake_vcc}}),
    .o  (ans)
  );

  // Operand 1, right to left: right side drives, left side is off.
  bm_4b_v2p #(.W(OPER_W)) busmacro2 (
    .li ({OPER_W{rfake_gnd}}),
    .lt ({OPER_W{rfake_vcc}}),
    .ri (oper1),
    .rt ({OPER_W{ffake_gnd}}),
    .o  (oper_rec1)
  );

  // Operand 2, right to left.
  bm_4b_v2p #(.W(OPER_W)) busmacro3 (
    .li ({OPER_W{rfake_gnd}}),
    .lt ({OPER_W{rfake_vcc}}),
    .ri (oper2),
    .rt ({OPER_W{ffake_gnd}}),
    .o  (oper_rec2)
  );

endmodule
