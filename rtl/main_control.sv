// Main control: the decode-stage controller of the pipeline.
//
// It looks at the opcode and funct field of the instruction in the IF/DE
// register and produces the whole control word for that instruction at
// once. The word is then carried in the pipeline registers, so the EX
// fields (ExtOp, ALUSrc, ALUOp, RegDst) are used one cycle later, the ME
// fields (MemW) two cycles later and the WB fields (MemtoReg, RegWr) three
// cycles later. It also reports the destination register and which source
// registers the instruction reads, which the forwarding and hazard logic
// need. This is purely combinational.
//
// The signal names follow the classic single-cycle MIPS control. The
// encodings, and the choice to treat any unknown instruction (including the
// all-zero word) as a no-op that writes nothing, are this design's own.
module main_control
  import mips_pkg::*;
(
  input  word_t ir,        // instruction in decode
  output ctrl_t ctrl,      // control word for the rest of the pipe
  output reg_t  rw         // destination register (rd or rt), 0 if none
);

  logic [5:0] op, fn;
  reg_t       rt, rd;

  assign op = ir[31:26];
  assign fn = ir[5:0];
  assign rt = ir[20:16];
  assign rd = ir[15:11];

  always_comb begin
    ctrl = CTRL_NOP;
    unique case (op)
      OP_RTYPE: begin
        ctrl.reg_dst = 1'b1;
        ctrl.use_rs  = 1'b1;
        ctrl.use_rt  = 1'b1;
        ctrl.reg_wr  = 1'b1;
        unique case (fn)
          FN_ADD:  ctrl.alu_op = ALU_ADD;
          FN_SUB:  ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          default: ctrl = CTRL_NOP;
        endcase
      end
      OP_ADDI: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_op  = ALU_ADD;
        ctrl.use_rs  = 1'b1;
        ctrl.reg_wr  = 1'b1;
      end
      OP_ORI: begin
        ctrl.ext_op  = 1'b0;
        ctrl.alu_src = 1'b1;
        ctrl.alu_op  = ALU_OR;
        ctrl.use_rs  = 1'b1;
        ctrl.reg_wr  = 1'b1;
      end
      OP_LW: begin
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.alu_op     = ALU_ADD;
        ctrl.use_rs     = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_op  = ALU_ADD;
        ctrl.use_rs  = 1'b1;
        ctrl.use_rt  = 1'b1;
        ctrl.mem_w   = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ext_op = 1'b1;
        ctrl.branch = 1'b1;
        ctrl.use_rs = 1'b1;
        ctrl.use_rt = 1'b1;
      end
      default: ctrl = CTRL_NOP;
    endcase
  end

  // Writes to r0 are dropped here, so no later stage ever forwards r0.
  always_comb begin
    rw = ctrl.reg_dst ? rd : rt;
    if (!ctrl.reg_wr) rw = '0;
  end

endmodule
