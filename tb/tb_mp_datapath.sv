// tb_mp_datapath: end-to-end test of the controller-less microprocessor.
//
// The datapath is connected to a behavioural memory. A behavioural
// sequencer in this testbench plays the part of the missing controller: it
// reads each opcode off the internal bus, decodes it with a testbench-only
// opcode encoding and drives the control lines cycle by cycle:
//   immediate op : opcode fetch, operand fetch with op          (2 cycles)
//   direct op    : opcode fetch, address -> MAR, MAR read with op (3 cycles)
//   STM          : opcode fetch, address -> MAR, MAR write        (3 cycles)
//   JMP/JC/JNC   : opcode fetch, target -> PC or skip byte        (2 cycles)
//   HALT         : opcode fetch, then nothing changes any more
//
// Part 1 runs the reference program of the design (LDI 9E, ADDI AA, STM 3F,
// ADCM 3F, ... JMP 12) from memory and checks the stored bytes 48, 91, E8, 57
// and the addresses it prescribes; on its second pass the JC falls through
// to a HALT. Part 2 runs random straight-line programs with forward jumps
// and compares accumulator, carry, PC and memory after every instruction
// with an instruction-level reference model. Every cycle the address pins
// and strobes are checked too. Each mechanism (immediate and direct operand,
// store, taken and untaken branch, carry set/cleared/kept, load winning over
// increment, halt, asynchronous reset) is counted and must occur.
module tb_mp_datapath;
  import mp_pkg::*;

  // testbench-only opcode encoding
  localparam logic [7:0] LDI = 8'h01, LDM = 8'h02, ADDI = 8'h03, ADDM = 8'h04,
                         ADCI = 8'h05, ADCM = 8'h06, XORI = 8'h07, XORM = 8'h08,
                         STM = 8'h09, JMP = 8'h0A, JC = 8'h0B, JNC = 8'h0C,
                         HALT = 8'h0F;

  logic       clk = 0, rst_n;
  logic       rd, wr, fetch, inc_pc, ld_pc, ld_mar;
  alu_op_e    op;
  logic [7:0] mem_addr, bus, acc, pc;
  wire  [7:0] mem_data;
  logic       mem_rd_n, mem_wr_n, carry;

  mp_datapath dut (.*);

  mem_model u_mem (
    .clk (clk),
    .addr(mem_addr),
    .data(mem_data),
    .rd_n(mem_rd_n),
    .wr_n(mem_wr_n)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;

  // mechanism counters
  int n_opfetch, n_imm, n_direct, n_store, n_jump_taken, n_branch_skip;
  int n_carry_set, n_carry_clr, n_carry_kept, n_ld_over_inc, n_halt, n_reset;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // Expected address of the current cycle, tracked by the sequencer itself.
  logic [7:0] seq_pc, seq_mar;

  // One control word for one clock cycle. Returns the internal bus value
  // sampled just before the rising edge.
  task automatic cyc(input bit r, input bit w, input bit f, input bit inc,
                     input bit ldp, input bit ldm, input alu_op_e o,
                     output logic [7:0] b);
    @(negedge clk);
    rd = r; wr = w; fetch = f; inc_pc = inc; ld_pc = ldp; ld_mar = ldm; op = o;
    #2;
    check(mem_addr === (f ? seq_pc : seq_mar), $sformatf("address %h", mem_addr));
    check(mem_rd_n === !r && mem_wr_n === !w, "strobe polarity");
    if (w) check(mem_data === acc, "accumulator driven onto data pins");
    b = bus;
    @(posedge clk);
    if (ldp) begin seq_pc = b; if (inc) n_ld_over_inc++; end
    else if (inc) seq_pc = seq_pc + 8'd1;
    if (ldm) seq_mar = b;
  endtask

  alu_op_e op_of[logic [7:0]];
  initial begin
    op_of[LDI] = OP_LOAD; op_of[LDM] = OP_LOAD; op_of[ADDI] = OP_ADD; op_of[ADDM] = OP_ADD;
    op_of[ADCI] = OP_ADDC; op_of[ADCM] = OP_ADDC; op_of[XORI] = OP_XOR; op_of[XORM] = OP_XOR;
  end

  bit halted;
  logic [7:0] last_store;
  bit         carry_before;

  // Fetch and execute one instruction through the control lines.
  task automatic step();
    logic [7:0] opc, b;
    carry_before = carry;
    cyc(1, 0, 1, 1, 0, 0, OP_HOLD, opc);
    n_opfetch++;
    case (opc)
      LDI, ADDI, ADCI, XORI: begin
        cyc(1, 0, 1, 1, 0, 0, op_of[opc], b);
        n_imm++;
      end
      LDM, ADDM, ADCM, XORM: begin
        cyc(1, 0, 1, 1, 0, 1, OP_HOLD, b);
        cyc(1, 0, 0, 0, 0, 0, op_of[opc], b);
        n_direct++;
      end
      STM: begin
        cyc(1, 0, 1, 1, 0, 1, OP_HOLD, b);
        last_store = acc;
        cyc(0, 1, 0, 0, 0, 0, OP_HOLD, b);
        n_store++;
      end
      JMP: begin
        cyc(1, 0, 1, 1, 1, 0, OP_HOLD, b);
        n_jump_taken++;
      end
      JC, JNC: begin
        if (carry == (opc == JC)) begin
          cyc(1, 0, 1, 0, 1, 0, OP_HOLD, b);
          n_jump_taken++;
        end else begin
          cyc(1, 0, 1, 1, 0, 0, OP_HOLD, b);
          n_branch_skip++;
        end
      end
      HALT: halted = 1;
      default: begin
        check(0, $sformatf("undefined opcode %h at %h", opc, seq_pc - 8'd1));
        halted = 1;
      end
    endcase
    #1;
    if (opc inside {ADDI, ADDM, ADCI, ADCM}) begin
      if (carry && !carry_before) n_carry_set++;
      if (!carry && carry_before) n_carry_clr++;
    end
    if (opc inside {LDI, LDM, XORI, XORM} && carry_before) n_carry_kept++;
  endtask

  // After HALT the sequencer keeps every register still.
  task automatic halt_idle(input int n);
    logic [7:0] b, pc0, acc0;
    bit c0;
    pc0 = pc; acc0 = acc; c0 = carry;
    repeat (n) cyc(0, 0, 1, 0, 0, 0, OP_HOLD, b);
    #1 check(pc === pc0 && acc === acc0 && carry === c0, "registers hold after HALT");
    n_halt++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rd = 0; wr = 0; fetch = 1; inc_pc = 0; ld_pc = 0; ld_mar = 0; op = OP_HOLD;
    rst_n = 1; #1 rst_n = 0; #1;
    check(pc === 8'h00 && acc === 8'h00 && carry === 1'b0, "asynchronous reset clears PC, A, C");
    n_reset++;
    @(negedge clk) rst_n = 1;
    seq_pc = 8'h00; seq_mar = 8'h00; halted = 0;
  endtask

  // ---------------- Part 1: the reference program ----------------
  task automatic load_reference_program();
    logic [7:0] p[] = '{
      LDI, 8'h9E,  ADDI, 8'hAA,  STM, 8'h3F,  ADCM, 8'h3F,    // 00..07
      STM, 8'h3F,  ADCI, 8'h7B,  XORM, 8'h3F, ADCI, 8'h4A,    // 08..0F
      STM, 8'h3E,  LDM, 8'h3F,   XORI, 8'hFF, ADDM, 8'h3E,    // 10..17
      JC, 8'h28,   HALT                                       // 18..1A
    };
    for (int i = 0; i < 256; i++) u_mem.mem[i] = 8'h00;
    foreach (p[i]) u_mem.mem[i] = p[i];
    u_mem.mem[8'h28] = ADDI; u_mem.mem[8'h29] = 8'h01;
    u_mem.mem[8'h2A] = STM;  u_mem.mem[8'h2B] = 8'h3E;
    u_mem.mem[8'h2C] = JMP;  u_mem.mem[8'h2D] = 8'h12;
  endtask

  task automatic run_reference_program();
    int c0;
    load_reference_program();
    do_reset();
    step(); check(acc === 8'h9E, "LDI 9E");
    step(); check(acc === 8'h48 && carry, "ADDI AA gives A=48 C=1");
    step(); check(last_store === 8'h48 && u_mem.mem[8'h3F] === 8'h48, "STM 3F stores 48");
    step(); check(acc === 8'h91 && !carry, "ADCM 3F gives A=91 C=0");
    step(); check(u_mem.mem[8'h3F] === 8'h91, "STM 3F stores 91");
    step(); check(acc === 8'h0C && carry, "ADCI 7B gives A=0C C=1");
    step(); check(acc === 8'h9D && carry, "XORM 3F gives A=9D C=1");
    step(); check(acc === 8'hE8 && !carry, "ADCI 4A gives A=E8 C=0");
    step(); check(u_mem.mem[8'h3E] === 8'hE8, "STM 3E stores E8");
    step(); check(acc === 8'h91, "LDM 3F");
    step(); check(acc === 8'h6E, "XORI FF");
    step(); check(acc === 8'h56 && carry, "ADDM 3E gives C=1");
    check(pc === 8'h18, "PC at JC");
    step(); check(pc === 8'h28, "JC 28 taken");
    step(); check(acc === 8'h57 && !carry, "ADDI 01");
    step(); check(u_mem.mem[8'h3E] === 8'h57, "STM 3E stores 57");
    c0 = cycles;
    step(); check(pc === 8'h12, "JMP 12");
    check(cycles - c0 === 2, "jump takes two cycles");
    // second pass: 91 ^ FF = 6E, 6E + 57 = C5 with no carry, JC falls through
    repeat (3) step();
    check(acc === 8'hC5 && !carry, "second pass A=C5 C=0");
    step(); check(pc === 8'h1A, "JC not taken skips its operand");
    step(); check(halted && pc === 8'h1B, "HALT reached");
    halt_idle(5);
  endtask

  // ---------------- Part 2: random programs against a reference model ----------------
  logic [7:0] ref_mem[256];
  logic [7:0] ref_acc, ref_pc;
  bit         ref_c, ref_halt;

  function automatic void ref_step();
    logic [7:0] opc, arg;
    logic [8:0] s;
    opc = ref_mem[ref_pc];
    if (opc == HALT) begin ref_pc++; ref_halt = 1; return; end
    arg = ref_mem[ref_pc + 8'd1];
    ref_pc += 8'd2;
    case (opc)
      LDI:  ref_acc = arg;
      LDM:  ref_acc = ref_mem[arg];
      ADDI: begin s = ref_acc + arg; {ref_c, ref_acc} = s; end
      ADDM: begin s = ref_acc + ref_mem[arg]; {ref_c, ref_acc} = s; end
      ADCI: begin s = ref_acc + arg + ref_c; {ref_c, ref_acc} = s; end
      ADCM: begin s = ref_acc + ref_mem[arg] + ref_c; {ref_c, ref_acc} = s; end
      XORI: ref_acc = ref_acc ^ arg;
      XORM: ref_acc = ref_acc ^ ref_mem[arg];
      STM:  ref_mem[arg] = ref_acc;
      JMP:  ref_pc = arg;
      JC:   if (ref_c) ref_pc = arg;
      JNC:  if (!ref_c) ref_pc = arg;
      default: ref_halt = 1;
    endcase
  endfunction

  // Program in 00..7F, data in 80..FF; jumps only go forward, so every
  // program ends at its HALT.
  task automatic make_random_program();
    logic [7:0] kinds[$], addrs[$];
    logic [7:0] opcs[13] = '{LDI, LDM, ADDI, ADDM, ADCI, ADCM, XORI, XORM, STM, JMP, JC, JNC, HALT};
    int a;
    a = 0;
    while (a < 8'h7C) begin
      logic [7:0] k;
      k = opcs[$urandom_range(0, 11)];
      if (k == JMP && ($urandom % 3) != 0) k = ADDI;  // fewer unconditional jumps
      kinds.push_back(k); addrs.push_back(8'(a));
      a += 2;
    end
    for (int i = 0; i < 256; i++) u_mem.mem[i] = (i >= 8'h80) ? 8'($urandom) : 8'h00;
    foreach (kinds[i]) begin
      logic [7:0] arg;
      case (kinds[i])
        JMP, JC, JNC: arg = (i + 1 < kinds.size()) ?
                            addrs[$urandom_range(i + 1, kinds.size() - 1)] : 8'(a);
        LDI, ADDI, ADCI, XORI: arg = 8'($urandom);
        default: arg = 8'($urandom_range(8'h80, 8'hFF));
      endcase
      u_mem.mem[addrs[i]] = kinds[i];
      u_mem.mem[addrs[i] + 8'd1] = arg;
    end
    u_mem.mem[a] = HALT;
  endtask

  task automatic run_random_program();
    int guard;
    make_random_program();
    foreach (ref_mem[i]) ref_mem[i] = u_mem.mem[i];
    ref_acc = 8'h00; ref_c = 0; ref_pc = 8'h00; ref_halt = 0;
    do_reset();
    guard = 0;
    while (!halted && guard < 200) begin
      step();
      ref_step();
      check(pc === ref_pc && acc === ref_acc && carry === ref_c && halted === ref_halt,
            $sformatf("state pc=%h a=%h c=%b, expected pc=%h a=%h c=%b",
                      pc, acc, carry, ref_pc, ref_acc, ref_c));
      guard++;
    end
    check(halted, "random program reaches HALT");
    for (int i = 0; i < 256; i++)
      check(u_mem.mem[i] === ref_mem[i], $sformatf("memory byte %h", i));
    halt_idle(3);
  endtask

  initial begin
    rst_n = 1; rd = 0; wr = 0; fetch = 1; inc_pc = 0; ld_pc = 0; ld_mar = 0; op = OP_HOLD;
    seq_pc = 0; seq_mar = 0;
    run_reference_program();
    repeat (40) run_random_program();

    $display("mechanisms: opfetch=%0d imm=%0d direct=%0d store=%0d jump=%0d skip=%0d",
             n_opfetch, n_imm, n_direct, n_store, n_jump_taken, n_branch_skip);
    $display("            carry_set=%0d carry_clr=%0d carry_kept=%0d ld_over_inc=%0d halt=%0d reset=%0d",
             n_carry_set, n_carry_clr, n_carry_kept, n_ld_over_inc, n_halt, n_reset);
    check(n_opfetch > 0, "opcode fetch happened");
    check(n_imm > 0, "immediate operand happened");
    check(n_direct > 0, "direct (MAR) read happened");
    check(n_store > 0, "store happened");
    check(n_jump_taken > 0, "jump taken happened");
    check(n_branch_skip > 0, "branch not taken happened");
    check(n_carry_set > 0, "carry set happened");
    check(n_carry_clr > 0, "carry cleared happened");
    check(n_carry_kept > 0, "carry kept by load/xor happened");
    check(n_ld_over_inc > 0, "PC load with increment asserted happened");
    check(n_halt > 0, "halt happened");
    check(n_reset > 0, "asynchronous reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
