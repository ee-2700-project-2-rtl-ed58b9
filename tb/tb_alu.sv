// tb_alu: self-checking test of the ALU.
//
// Sweeps every operation over all accumulator/operand pairs with both carry
// values and compares result and carry with a reference written directly
// from the instruction definitions (additions carry out of bit 7, load and
// xor leave the carry alone, hold changes nothing).
module tb_alu;
  import mp_pkg::*;

  alu_op_e    op;
  logic [7:0] acc, operand, result;
  logic       carry_in, carry_out;
  int         checks = 0, failures = 0;

  alu dut (.*);

  task automatic check_one();
    logic [7:0] exp_r;
    logic       exp_c;
    int         s;
    exp_r = acc;
    exp_c = carry_in;
    case (op)
      OP_LOAD: exp_r = operand;
      OP_ADD: begin
        s = int'(acc) + int'(operand);
        exp_r = s[7:0]; exp_c = (s > 255);
      end
      OP_ADDC: begin
        s = int'(acc) + int'(operand) + int'(carry_in);
        exp_r = s[7:0]; exp_c = (s > 255);
      end
      OP_XOR: exp_r = acc ^ operand;
      default: ;
    endcase
    checks++;
    if (result !== exp_r || carry_out !== exp_c) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s acc=%h opnd=%h cin=%b -> %h/%b, expected %h/%b",
                 op.name(), acc, operand, carry_in, result, carry_out, exp_r, exp_c);
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops[5] = '{OP_HOLD, OP_LOAD, OP_ADD, OP_ADDC, OP_XOR};
    foreach (ops[k]) begin
      for (int a = 0; a < 256; a++)
        for (int b = 0; b < 256; b++)
          for (int c = 0; c < 2; c++) begin
            op = ops[k]; acc = 8'(a); operand = 8'(b); carry_in = 1'(c);
            #1 check_one();
          end
    end
    // The worked values of the reference program: 9E+AA, 48+48+1, 91+7B, 9D+4A+1.
    op = OP_ADD;  acc = 8'h9E; operand = 8'hAA; carry_in = 0;
    #1 checks++; if ({carry_out, result} !== 9'h148) failures++;
    op = OP_ADDC; acc = 8'h48; operand = 8'h48; carry_in = 1;
    #1 checks++; if ({carry_out, result} !== 9'h091) failures++;
    op = OP_ADDC; acc = 8'h91; operand = 8'h7B; carry_in = 0;
    #1 checks++; if ({carry_out, result} !== 9'h10C) failures++;
    op = OP_ADDC; acc = 8'h9D; operand = 8'h4A; carry_in = 1;
    #1 checks++; if ({carry_out, result} !== 9'h0E8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
