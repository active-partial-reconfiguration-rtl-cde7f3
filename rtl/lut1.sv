// lut1: one-input look-up table, o = INIT[i0], with the interface of the FPGA
// vendor's LUT1 primitive. The design places pairs of these in every region
// (INIT 2'b00 as a local ground, INIT 2'b11 as a local supply) so that the
// constants that enable or disable bus-macro drivers come from inside the same
// region rather than crossing the reconfiguration boundary. Combinational.
module lut1 #(
  parameter logic [1:0] INIT = 2'b01
) (
  input  logic i0,
  output logic o
);

  always_comb o = INIT[i0];

endmodule
