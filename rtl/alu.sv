// Single-cycle integer ALU; four of them serve the central window.
//
// Computes the integer operations of the instruction set and evaluates
// branches: for BEQ/BNE/JMP it reports whether the branch is taken and its
// target pc + imm. Branches are fetched as not taken, so a taken branch is a
// misprediction that the window resolves when the branch commits.
// The operation set is this design's own. Combinational.
module alu
  import mt_pkg::*;
(
  input  opcode_e op,
  input  word_t   a,
  input  word_t   b,
  input  word_t   imm,
  input  word_t   pc,
  output word_t   result,
  output logic    taken,
  output word_t   target
);
  always_comb begin
    result = '0;
    taken  = 1'b0;
    unique case (op)
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_SLT:  result = word_t'($signed(a) < $signed(b));
      OP_SLL:  result = a << b[4:0];
      OP_SRL:  result = a >> b[4:0];
      OP_ADDI: result = a + imm;
      OP_LUI:  result = {imm[15:0], 16'h0000};
      OP_BEQ:  taken  = (a == b);
      OP_BNE:  taken  = (a != b);
      OP_JMP:  taken  = 1'b1;
      default: result = '0;
    endcase
  end
  assign target = pc + imm;
endmodule
