# An 8-bit accumulator microprocessor datapath

This is a small 8-bit accumulator machine. It fetches an instruction stream from a synchronous
memory: a one-byte opcode, followed for most instructions by a second byte. That second byte is
immediate data, a memory address or a jump target. There is one working register, the
accumulator, which holds the result of every arithmetic instruction, plus a carry flag. The
second operand of an instruction always comes over the memory data bus. Memory has 256 bytes,
reached over an 8-bit address bus. One 8-bit bidirectional data bus carries both reads and
writes.

The RTL is the **datapath only**. Every control line is a top-level input, so the unit can be
driven cycle by cycle by a testbench or by a separate controller. The controller that decodes
opcodes is not part of this design (see "What is not included").

## Instruction set the datapath supports

| Instruction | Effect | Carry |
|---|---|---|
| LDI n / LDM a | A <- n / A <- M[a] | unchanged |
| ADDI n / ADDM a | A <- A + n / A + M[a] | carry out of bit 7 |
| ADCI n / ADCM a | A <- A + n + C / A + M[a] + C | carry out of bit 7 |
| XORI n / XORM a | A <- A ^ n / A ^ M[a] | unchanged |
| STM a | M[a] <- A | unchanged |
| JMP t | PC <- t | unchanged |
| JC t / JNC t | PC <- t if C = 1 / C = 0, otherwise skip t | unchanged |
| HALT | stop | unchanged |

Immediate forms take the operand from the byte after the opcode. Direct forms treat that byte as
an address. No binary opcode values are defined: the encoding belongs to whatever controller
drives the datapath.

## The datapath

```
                 +---------------------------- bus (to controller) ----+
                 |                                                     |
 mem_data <-> [mem_interface] --bus--+--> [alu] --> [accumulator] --+--+--> wdata (stores)
 mem_rd_n  <-     ^ wr, rd           |      ^ op     A, C           |
 mem_wr_n  <-                        |      +-----------------------+
                                     +--> [program_counter] --pc--+
                                     |        inc_pc, ld_pc        |
                                     +--> [mar] ------------mar----+--> [addr_mux] --> mem_addr
                                              ld_mar                       fetch
```

* **accumulator** (`rtl/accumulator.sv`): one 9-bit register holding the 8-bit accumulator A
  and the carry C. It loads at the clock edge when enabled. The top disables it for
  `OP_HOLD`, so an idle cycle never disturbs A or C.
* **alu** (`rtl/alu.sv`): combinational. A and C are always its first operand; the internal
  bus is its second. The operations are pass (load), add, add with carry, xor and hold. Only
  the two additions write C.
* **program_counter** (`rtl/program_counter.sv`): an 8-bit loadable counter. `inc_pc` advances
  it at the end of the cycle in which it was used. `ld_pc` loads it from the bus, and load
  wins when both are asserted. With neither asserted it holds, which is what a data-transfer
  cycle and a halted machine need.
* **mar** (`rtl/mar.sv`): the memory address register. It catches the address byte of a
  direct-mode instruction from the bus, so the following cycle can use that address while the
  PC stays where it is.
* **addr_mux** (`rtl/addr_mux.sv`): drives the address pins. `fetch = 1` selects the PC and
  `fetch = 0` selects the MAR.
* **mem_interface** (`rtl/mem_interface.sv`): tri-state line drivers on the shared data pins.
  When `wr` is asserted, the accumulator drives the pins. At all other times the pins are
  released, and their value is passed onto the internal bus. The pin strobes `mem_rd_n` and
  `mem_wr_n` are active low. The internal control lines `rd` and `wr` are active high.
* **mp_datapath** (`rtl/mp_datapath.sv`): the top level, which wires the above together. It
  also carries an assertion that `rd` and `wr` are never asserted together.
* **mp_pkg** (`rtl/mp_pkg.sv`): the widths and the `alu_op_e` operation type.

## Control lines and instruction sequences

The hardest part of using the datapath is knowing which control word to apply in which cycle.
Each row below is one clock cycle. The controls are applied during the cycle and take effect
at the rising edge that ends it. The memory answers within the same cycle: a read drives the
data pins combinationally from the address, and a write is captured at the edge.

| Cycle | rd | wr | fetch | inc_pc | ld_pc | ld_mar | op | What happens |
|---|---|---|---|---|---|---|---|---|
| opcode fetch (all) | 1 | 0 | 1 | 1 | 0 | 0 | HOLD | opcode appears on `bus` for the controller; PC+1 |
| immediate operand | 1 | 0 | 1 | 1 | 0 | 0 | LOAD/ADD/ADDC/XOR | A, C updated from the byte; PC+1 |
| direct: address byte | 1 | 0 | 1 | 1 | 0 | 1 | HOLD | MAR <- address; PC+1 |
| direct: data read | 1 | 0 | 0 | 0 | 0 | 0 | LOAD/ADD/ADDC/XOR | MAR on address bus; A, C updated |
| STM: address byte | 1 | 0 | 1 | 1 | 0 | 1 | HOLD | MAR <- address; PC+1 |
| STM: write | 0 | 1 | 0 | 0 | 0 | 0 | HOLD | A driven onto the pins, written to M[MAR] |
| jump taken | 1 | 0 | 1 | x | 1 | 0 | HOLD | PC <- target |
| conditional not taken | 1 | 0 | 1 | 1 | 0 | 0 | HOLD | target byte skipped |
| halted | 0 | 0 | x | 0 | 0 | 0 | HOLD | nothing changes |

So an immediate instruction, a jump and a conditional branch take 2 cycles each. A direct
instruction and a store take 3 cycles each. The carry flag is a top-level output, so a
controller can decide JC and JNC in the cycle before the jump target is fetched. The address
is combinational from PC or MAR. The data pins are driven combinationally from A while
`wr = 1`.

A worked example, a load from address 23 (LDM 23 at PC = p):

1. The PC p is on the address bus. The opcode comes back on `bus`, and the PC becomes p+1.
2. p+1 is on the address bus. The byte 23 comes back and is loaded into the MAR, and the PC
   becomes p+2.
3. `fetch = 0` puts 23 on the address bus. M[23] comes back, and `op = LOAD` writes it into A.

## Reset and clocking

`rst_n` is an asynchronous, active-low reset. It clears PC, MAR, A and C, so execution starts
at address 0. There is one clock, and all state changes on its rising edge. The target is at
least 20 MHz. The longest path runs from the data pins through the 8-bit adder into the
accumulator. No timing analysis has been done.

## Where this RTL makes its own choices

* **Reset polarity.** The reset is active low, as the requirements say. The reference test
  sequence holds reset high and then releases it low. That sequence is reproduced here with
  the polarity inverted.
* **Load over increment.** The reference jump sequence asserts `inc_pc` and `ld_pc` together
  and expects to land on the target. The PC therefore gives `ld_pc` priority.
* **Operation encoding.** `alu_op_e` uses the values HOLD = 0, LOAD = 1, ADD = 2, ADDC = 3 and
  XOR = 4. This encoding is local to this design.
* **Reset values.** Register reset values are zero. This matters only for the PC.
* **Internal bus while writing.** During a store, the internal bus carries the accumulator
  value, because the pins are being driven from it.
* **ALU structure.** The ALU is an adder plus an xor. Only its function is specified.
* **Tri-state pins.** The data pins are a real `inout` with `'z` release, as a bidirectional
  bus needs. Where the design goes onto an FPGA or into a pad ring, this is the place to split
  the bus into in, out and enable signals.

## What is not included

* **The controller**, which decodes opcodes and produces the control words above, is left as a
  separate design step. The datapath exposes everything a controller needs: the `bus` for
  opcodes and the `carry` flag for conditional jumps.
* **The memory** is external. `tb/mem_model.sv` is a behavioural model of it for simulation.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_alu` | all 5 operations x 256 x 256 operand pairs x both carry values, plus the worked sums of the reference program |
| `tb_accumulator` | random data with random enable; asynchronous reset |
| `tb_program_counter` | counting through a wrap, random load and increment with load priority, asynchronous reset |
| `tb_mar` | random load enable; asynchronous reset |
| `tb_addr_mux` | random PC, MAR and select |
| `tb_mem_interface` | read path, write drive, strobe polarity, bus release |
| `tb_mp_datapath` | the whole datapath with a memory model and a behavioural sequencer (below) |

`tb_mp_datapath` stands in for the missing controller. It reads each opcode off `bus`, decodes
it with an opcode encoding of its own (LDI = 01 ... JNC = 0C, HALT = 0F) and applies the
control words from the table above. The test has two parts:

* **The reference program.** LDI 9E, ADDI AA, STM 3F, ADCM 3F, STM 3F, ADCI 7B, XORM 3F,
  ADCI 4A, STM 3E, LDM 3F, XORI FF, ADDM 3E, JC 28, ADDI 01, STM 3E, JMP 12. It runs from
  memory, and the test checks the stored bytes 48, 91, E8 and 57, the intermediate A and C
  values, and the jump addresses. On its second pass the JC is not taken and falls into a
  HALT.
* **Random programs.** 40 of them, with forward jumps only. After every instruction, PC, A, C
  and the halt state are compared with an instruction-level model, and at the end the whole
  memory is compared too.

Every cycle, the testbench also checks the address pins, the strobe polarities and the data
driven during stores. It counts how often each mechanism occurs and fails if any count is zero.
The mechanisms are: immediate operands, direct reads, stores, taken and untaken branches, carry
set, cleared and kept, load winning over increment, halt, and asynchronous reset. All
testbenches run at the default 8-bit width.

Running a testbench with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mp_pkg.sv tb/tb_mp_datapath.sv --top-module tb_mp_datapath
./obj_dir/Vtb_mp_datapath
```

To run a block's own testbench, replace `tb_mp_datapath` with `tb_alu`, `tb_accumulator` and
so on. Lint a module with `verilator --lint-only -Wall -Irtl rtl/mp_pkg.sv rtl/<module>.sv`.

## Changing it

* The width parameters (`W`, `AW`) default to 8 and are passed down from `mp_datapath`. The top
  uses one width for both the address and the data buses, because the PC and MAR are loaded
  from the data bus.
* To add an ALU operation, extend `alu_op_e` in `mp_pkg` and the `case` in `alu`. The
  accumulator enable is already "any operation except HOLD".
* A controller attaches to the control inputs, `bus` and `carry`. The table above is its
  specification.
