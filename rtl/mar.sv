// mar: memory address register.
//
// For direct-addressed instructions the second program byte is an address.
// It is captured here from the internal data bus (ld=1) so that the next
// cycle can put it on the address bus through the address multiplexer while
// the PC stays put. Cleared by the asynchronous active-low reset.
//
// Interface: ld and d (data bus) in, q out to the address multiplexer.
// Timing: one register stage; q changes at the rising edge after ld=1.
//
// The register follows the design; its reset value of zero is this
// design's choice.
module mar #(
  parameter int unsigned AW = mp_pkg::ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld,
  input  logic [AW-1:0] d,
  output logic [AW-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

endmodule
