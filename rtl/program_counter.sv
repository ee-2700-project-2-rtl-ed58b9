// program_counter: loadable up-counter that supplies the instruction fetch
// address.
//
// The counter advances at the end of the cycle in which it was used (inc=1)
// and can be loaded from the internal data bus for jumps (ld=1). When both
// are asserted the load wins, so a jump may leave the increment line high.
// With neither asserted it holds, which is how data-transfer cycles and a
// halted processor keep the PC still. The asynchronous active-low reset
// clears it, so execution starts at address zero.
//
// Interface: inc, ld and d (data bus) in; pc out to the address multiplexer.
// Timing: one register stage; pc changes at the rising edge.
//
// The load-over-increment priority is this design's reading of the jump
// sequence, which asserts both lines.
module program_counter #(
  parameter int unsigned AW = mp_pkg::ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc,
  input  logic          ld,
  input  logic [AW-1:0] d,
  output logic [AW-1:0] pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   pc <= '0;
    else if (ld)  pc <= d;
    else if (inc) pc <= pc + 1'b1;
  end

endmodule
