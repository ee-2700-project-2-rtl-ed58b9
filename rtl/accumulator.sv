// accumulator: the 9-bit accumulator register, eight data bits plus the
// carry flag, built from D flip-flops.
//
// The register takes the ALU result and carry at a rising clock edge when
// its clock enable is asserted and holds otherwise. It is cleared by the
// asynchronous active-low reset.
//
// Interface: d/carry_d come from the ALU, q/carry_q feed the ALU's first
// operand, the memory write path and (carry) the controller.
// Timing: one register stage; q changes at the rising edge after en=1.
//
// Keeping the carry in the same register as the accumulator follows the
// design; the reset value of zero is this design's choice.
module accumulator #(
  parameter int unsigned W = mp_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  input  logic         carry_d,
  output logic [W-1:0] q,
  output logic         carry_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      carry_q <= 1'b0;
    end else if (en) begin
      q       <= d;
      carry_q <= carry_d;
    end
  end

endmodule
