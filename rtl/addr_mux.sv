// addr_mux: selects the memory address.
//
// During instruction and operand fetches the program counter drives the
// address bus (fetch=1); during the data-transfer cycle of a direct-mode
// instruction the memory address register does (fetch=0).
//
// Interface: fetch, pc, mar in; addr out (the memory address pins).
// Timing: combinational.
//
// The multiplexer follows the design; the select polarity follows the
// control line's name.
module addr_mux #(
  parameter int unsigned AW = mp_pkg::ADDR_W
) (
  input  logic          fetch,
  input  logic [AW-1:0] pc,
  input  logic [AW-1:0] mar,
  output logic [AW-1:0] addr
);

  assign addr = fetch ? pc : mar;

endmodule
