// apr_pkg: types and constants shared by the active partial reconfiguration
// demonstrator. The operand and result width (4 bits, one DIP switch or LED per
// bit) and the request byte 0x55 that the fixed region sends to the host before
// each reconfiguration follow the design description; the encoding of the
// loaded-module selector is this design's own.
package apr_pkg;

  // Width of each operand and of the result.
  localparam int unsigned OPER_W = 4;

  // Byte sent over RS-232 to ask the host for a reconfiguration.
  localparam logic [7:0] RECONFIG_REQ_BYTE = 8'b0101_0101;

  // Which reconfigurable module currently occupies the reconfigurable region.
  typedef enum logic [0:0] {
    RM_ADDER      = 1'b0,
    RM_SUBTRACTOR = 1'b1
  } rm_kind_e;

endpackage
