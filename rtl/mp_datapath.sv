// mp_datapath: an 8-bit accumulator microprocessor without its controller.
//
// The processor fetches one-byte opcodes, each optionally followed by one
// byte of immediate data or of address, from a synchronous memory. The
// accumulator and carry flag sit directly at the ALU, whose second operand
// is the internal data bus. The PC generates sequential fetch addresses and
// can be loaded from the bus for jumps; the MAR holds the address byte of a
// direct-mode instruction, and a multiplexer puts either PC or MAR on the
// address pins. The memory interface drives the accumulator onto the data
// pins for stores and otherwise passes the pins onto the internal bus.
//
// All control lines are inputs: rd, wr (active high, never together),
// fetch (1 = PC, 0 = MAR on the address bus), inc_pc (PC += 1 at the end of
// the cycle), ld_pc (PC <= bus, wins over inc_pc), ld_mar (MAR <= bus) and
// op (accumulator operation; OP_HOLD disables the accumulator's clock). The
// internal bus (opcodes) and the carry flag are outputs for a controller;
// acc and pc are brought out for observation.
//
// Timing: every control word takes one clock cycle. Instruction sequences
// are: immediate (LDI/ADDI/ADCI/XORI) 2 cycles - opcode fetch, operand fetch
// with op set; direct (LDM/ADDM/ADCM/XORM) 3 cycles - opcode fetch, address
// fetch into MAR, MAR-addressed read with op set; STM 3 cycles, the last a
// write; JMP/JC/JNC 2 cycles, the second loading the PC or, if not taken,
// only incrementing it; HALT holds every register.
//
// The partition and its signals follow the design; the active-low reset
// follows its requirement list, and the control encoding is this design's
// choice.
module mp_datapath
  import mp_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // control lines (from a controller)
  input  logic         rd,
  input  logic         wr,
  input  logic         fetch,
  input  logic         inc_pc,
  input  logic         ld_pc,
  input  logic         ld_mar,
  input  alu_op_e      op,
  // memory interface
  output logic [W-1:0] mem_addr,
  inout  wire  [W-1:0] mem_data,
  output logic         mem_rd_n,
  output logic         mem_wr_n,
  // status to the controller and observation
  output logic [W-1:0] bus,
  output logic         carry,
  output logic [W-1:0] acc,
  output logic [W-1:0] pc
);

  logic [W-1:0] alu_result;
  logic         alu_carry;
  logic [W-1:0] mar_q;

  alu #(.W(W)) u_alu (
    .op       (op),
    .acc      (acc),
    .carry_in (carry),
    .operand  (bus),
    .result   (alu_result),
    .carry_out(alu_carry)
  );

  accumulator #(.W(W)) u_acc (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (op != OP_HOLD),
    .d      (alu_result),
    .carry_d(alu_carry),
    .q      (acc),
    .carry_q(carry)
  );

  program_counter #(.AW(W)) u_pc (
    .clk  (clk),
    .rst_n(rst_n),
    .inc  (inc_pc),
    .ld   (ld_pc),
    .d    (bus),
    .pc   (pc)
  );

  mar #(.AW(W)) u_mar (
    .clk  (clk),
    .rst_n(rst_n),
    .ld   (ld_mar),
    .d    (bus),
    .q    (mar_q)
  );

  addr_mux #(.AW(W)) u_amux (
    .fetch(fetch),
    .pc   (pc),
    .mar  (mar_q),
    .addr (mem_addr)
  );

  mem_interface #(.W(W)) u_mem_if (
    .rd      (rd),
    .wr      (wr),
    .wdata   (acc),
    .mem_data(mem_data),
    .mem_rd_n(mem_rd_n),
    .mem_wr_n(mem_wr_n),
    .bus     (bus)
  );

  // Read and write are never asserted at the same time.
  a_rd_wr_exclusive : assert property (@(posedge clk) !(rd && wr))
    else $error("read and write asserted together");

endmodule
