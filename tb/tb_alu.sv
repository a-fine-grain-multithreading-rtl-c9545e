// Testbench for alu: random operands for every operation, compared with a
// behavioural model; branch taken/target checked for BEQ, BNE and JMP.
module tb_alu;
  import mt_pkg::*;
  int checks = 0, failures = 0;
  opcode_e op;
  word_t a, b, imm, pc, result, target;
  logic taken;
  alu dut (.*);

  opcode_e ops [13] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL,
                        OP_ADDI, OP_LUI, OP_BEQ, OP_BNE, OP_JMP};
  initial begin
    for (int n = 0; n < 2000; n++) begin
      word_t er;
      logic et;
      op = ops[n % 13];
      a = $urandom; b = (n % 5 == 0) ? a : $urandom;
      imm = {{16{1'b0}}, 16'($urandom)}; pc = $urandom;
      #1;
      er = 0; et = 0;
      case (op)
        OP_ADD: er = a + b;   OP_SUB: er = a - b;  OP_AND: er = a & b;
        OP_OR:  er = a | b;   OP_XOR: er = a ^ b;
        OP_SLT: er = ($signed(a) < $signed(b)) ? 1 : 0;
        OP_SLL: er = a << (b % 32); OP_SRL: er = a >> (b % 32);
        OP_ADDI: er = a + imm; OP_LUI: er = imm * 65536;
        OP_BEQ: et = (a == b); OP_BNE: et = (a != b); OP_JMP: et = 1;
        default: ;
      endcase
      checks++;
      if (op inside {OP_BEQ, OP_BNE, OP_JMP}) begin
        if (taken !== et || target !== pc + imm) begin
          failures++; $display("FAIL %s taken %b exp %b", op.name(), taken, et);
        end
      end else if (result !== er) begin
        failures++; $display("FAIL %s a=%h b=%h got %h exp %h", op.name(), a, b, result, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
