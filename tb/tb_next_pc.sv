// Self-checking test of next_pc: sequential fetch, hold while stalled,
// taken and untaken beq (positive and negative offsets), and a branch that
// arrives during a stall, which must not redirect. The expected PC is
// tracked here from the instruction set's rule: target = address after the
// branch + 4 * sign-extended offset.
module tb_next_pc;
  import mips_pkg::*;

  logic clk = 0, rst_n = 0;
  logic stall, branch, taken;
  word_t op_a, op_b, de_pc4, pc, pc4;
  logic [15:0] de_imm;
  int checks = 0, failures = 0;
  word_t exp_pc;

  next_pc #(.RESET_PC(32'h40)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    stall = 0; branch = 0; op_a = 0; op_b = 0; de_pc4 = 0; de_imm = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    check(pc, 32'h40, "reset pc");
    exp_pc = 32'h40;
    for (int n = 0; n < 3000; n++) begin
      logic eq;
      stall  = ($urandom_range(0, 4) == 0);
      branch = ($urandom_range(0, 2) == 0);
      op_a   = $urandom_range(0, 3);
      op_b   = $urandom_range(0, 3);
      de_pc4 = exp_pc;
      de_imm = 16'($signed($urandom_range(0, 64)) - 32);
      #1;
      check(pc4, exp_pc + 4, "pc4");
      eq = branch && (op_a == op_b) && !stall;
      checks++;
      if (taken !== eq) begin failures++; $display("FAIL taken"); end
      @(posedge clk);
      if (stall)   exp_pc = exp_pc;
      else if (eq) exp_pc = de_pc4 + 32'($signed(de_imm)) * 4;
      else         exp_pc = exp_pc + 4;
      @(negedge clk);
      check(pc, exp_pc, "pc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
