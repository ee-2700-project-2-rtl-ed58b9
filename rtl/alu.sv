// alu: combinational arithmetic unit of the accumulator machine.
//
// One operand is always the accumulator (with the carry flag), the other is
// the byte on the internal data bus, which is either an immediate byte of the
// program or a byte read from memory. The unit can pass the operand through
// (load), add it, add it plus the carry, or exclusive-or it with the
// accumulator. Only the two additions produce a new carry; every other
// operation returns the carry flag unchanged, and OP_HOLD returns the
// accumulator unchanged as well.
//
// Interface: op selects the operation; acc/carry_in are the current register
// contents; operand is the data bus; result/carry_out are the values to be
// written into the accumulator at the next clock edge.
// Timing: purely combinational, no latency.
//
// The set of operations follows the instruction set; the adder-plus-xor
// structure is the simplest one that provides it and is this design's choice.
module alu
  import mp_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  alu_op_e        op,
  input  logic [W-1:0]   acc,
  input  logic           carry_in,
  input  logic [W-1:0]   operand,
  output logic [W-1:0]   result,
  output logic           carry_out
);

  logic [W:0] sum;
  logic       cin;

  // Carry-in is used only by add-with-carry.
  assign cin = (op == OP_ADDC) ? carry_in : 1'b0;
  assign sum = {1'b0, acc} + {1'b0, operand} + {{W{1'b0}}, cin};

  always_comb begin
    result    = acc;
    carry_out = carry_in;
    unique case (op)
      OP_HOLD: ;
      OP_LOAD: result = operand;
      OP_ADD, OP_ADDC: {carry_out, result} = sum;
      OP_XOR:  result = acc ^ operand;
      default: ;
    endcase
  end

endmodule
