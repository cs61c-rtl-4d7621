// Execute unit ("Exec"): immediate extension, operand select and ALU.
//
// In EX the instruction's A operand latch always feeds the ALU's first
// input. The second input is the B latch or, when ALUSrc is set, the
// 16-bit immediate, sign-extended when ExtOp is set (addi, lw, sw) and
// zero-extended otherwise (ori). The ALU adds, subtracts, ands, ors or xors.
// The result becomes S in the EX/ME register. Purely combinational.
module alu
  import mips_pkg::*;
(
  input  word_t       a,
  input  word_t       b,
  input  logic [15:0] imm,
  input  logic        ext_op,
  input  logic        alu_src,
  input  alu_op_e     alu_op,
  output word_t       s
);

  word_t ext_imm, opb;

  assign ext_imm = ext_op ? {{16{imm[15]}}, imm} : {16'h0000, imm};
  assign opb     = alu_src ? ext_imm : b;

  always_comb begin
    unique case (alu_op)
      ALU_ADD: s = a + opb;
      ALU_SUB: s = a - opb;
      ALU_AND: s = a & opb;
      ALU_OR:  s = a | opb;
      ALU_XOR: s = a ^ opb;
      default: s = a + opb;
    endcase
  end

endmodule
