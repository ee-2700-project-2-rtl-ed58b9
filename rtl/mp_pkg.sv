// mp_pkg: types and constants shared by the accumulator-machine datapath.
//
// The datapath is 8 bits wide: an 8-bit memory address bus and an 8-bit
// data bus. The ALU operation names (hold, load, add, add-with-carry,
// exclusive-or) are the ones the datapath's control lines use; their binary
// encoding is this design's own choice.
package mp_pkg;

  localparam int unsigned DATA_W = 8;  // accumulator and data bus width
  localparam int unsigned ADDR_W = 8;  // memory address bus width

  // Operation applied to the accumulator in the current cycle.
  typedef enum logic [2:0] {
    OP_HOLD = 3'd0,  // accumulator and carry keep their value
    OP_LOAD = 3'd1,  // accumulator <= operand, carry unchanged
    OP_ADD  = 3'd2,  // {carry, acc} <= acc + operand
    OP_ADDC = 3'd3,  // {carry, acc} <= acc + operand + carry
    OP_XOR  = 3'd4   // accumulator <= acc ^ operand, carry unchanged
  } alu_op_e;

endpackage
