// Self-checking test of main_control: every supported instruction, with
// random register fields, against a table of expected control words and
// destinations written out here; unknown opcodes and funct codes must
// decode as a no-op.
module tb_main_control;
  import mips_pkg::*;

  logic clk = 0;
  word_t ir;
  ctrl_t ctrl;
  reg_t rw;
  int checks = 0, failures = 0;

  main_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {ext, src, aluop, regdst, memw, branch, m2r, regwr, use_rs, use_rt}
  function automatic ctrl_t mk(logic e, logic s, alu_op_e o, logic d, logic w,
                               logic br, logic m, logic r, logic urs, logic urt);
    ctrl_t c;
    c.ext_op = e; c.alu_src = s; c.alu_op = o; c.reg_dst = d; c.mem_w = w;
    c.branch = br; c.mem_to_reg = m; c.reg_wr = r; c.use_rs = urs; c.use_rt = urt;
    return c;
  endfunction

  task automatic expect_ctrl(word_t inst, ctrl_t exp, reg_t exp_rw, string name);
    ir = inst; #1;
    checks++;
    if (ctrl !== exp) begin
      failures++;
      $display("FAIL %s ctrl: got %p expected %p", name, ctrl, exp);
    end
    checks++;
    if (rw !== exp_rw) begin
      failures++;
      $display("FAIL %s rw: got %0d expected %0d", name, rw, exp_rw);
    end
  endtask

  initial begin
    reg_t rs, rt, rd;
    logic [15:0] imm;
    for (int n = 0; n < 200; n++) begin
      rs = reg_t'($urandom); rt = reg_t'($urandom); rd = reg_t'($urandom);
      imm = 16'($urandom);
      expect_ctrl(enc_r(FN_ADD, rd, rs, rt), mk(0,0,ALU_ADD,1,0,0,0,1,1,1), rd, "add");
      expect_ctrl(enc_r(FN_SUB, rd, rs, rt), mk(0,0,ALU_SUB,1,0,0,0,1,1,1), rd, "sub");
      expect_ctrl(enc_r(FN_AND, rd, rs, rt), mk(0,0,ALU_AND,1,0,0,0,1,1,1), rd, "and");
      expect_ctrl(enc_r(FN_OR,  rd, rs, rt), mk(0,0,ALU_OR, 1,0,0,0,1,1,1), rd, "or");
      expect_ctrl(enc_r(FN_XOR, rd, rs, rt), mk(0,0,ALU_XOR,1,0,0,0,1,1,1), rd, "xor");
      expect_ctrl(enc_i(OP_ADDI, rt, rs, imm), mk(1,1,ALU_ADD,0,0,0,0,1,1,0), rt, "addi");
      expect_ctrl(enc_i(OP_ORI,  rt, rs, imm), mk(0,1,ALU_OR, 0,0,0,0,1,1,0), rt, "ori");
      expect_ctrl(enc_i(OP_LW,   rt, rs, imm), mk(1,1,ALU_ADD,0,0,0,1,1,1,0), rt, "lw");
      expect_ctrl(enc_i(OP_SW,   rt, rs, imm), mk(1,1,ALU_ADD,0,1,0,0,0,1,1), 5'd0, "sw");
      expect_ctrl(enc_i(OP_BEQ,  rt, rs, imm), mk(1,0,ALU_ADD,0,0,1,0,0,1,1), 5'd0, "beq");
      expect_ctrl({6'h3F, rs, rt, imm}, CTRL_NOP, 5'd0, "unknown op");
      expect_ctrl({OP_RTYPE, rs, rt, rd, 5'd0, 6'h01}, CTRL_NOP, 5'd0, "unknown funct");
    end
    expect_ctrl(32'h0, CTRL_NOP, 5'd0, "nop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
