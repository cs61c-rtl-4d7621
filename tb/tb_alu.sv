// Self-checking test of alu: random operands, immediates and control,
// compared with results computed here from the operation's definition,
// plus directed cases for sign versus zero extension.
module tb_alu;
  import mips_pkg::*;

  logic clk = 0;
  word_t a, b, s;
  logic [15:0] imm;
  logic ext_op, alu_src;
  alu_op_e alu_op;
  int checks = 0, failures = 0;

  alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_alu(word_t x, word_t y, logic [15:0] i,
                                    logic ext, logic src, alu_op_e op);
    longint unsigned yy;
    if (src) yy = ext ? longint'($signed(i)) : longint'(i);
    else     yy = y;
    case (op)
      ALU_ADD: return word_t'(longint'(x) + yy);
      ALU_SUB: return word_t'(longint'(x) - yy);
      ALU_AND: return x & word_t'(yy);
      ALU_OR:  return x | word_t'(yy);
      default: return x ^ word_t'(yy);
    endcase
  endfunction

  task automatic apply(word_t x, word_t y, logic [15:0] i, logic ext,
                       logic src, alu_op_e op);
    word_t exp;
    a = x; b = y; imm = i; ext_op = ext; alu_src = src; alu_op = op;
    #1;
    exp = ref_alu(x, y, i, ext, src, op);
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h imm=%h ext=%b src=%b: got %h exp %h",
               op, x, y, i, ext, src, s, exp);
    end
  endtask

  initial begin
    // directed: addi with a negative immediate, ori with the same bits
    apply(32'd10, 32'd0, 16'hFFFF, 1'b1, 1'b1, ALU_ADD);
    checks++; if (s !== 32'd9) begin failures++; $display("FAIL addi -1"); end
    apply(32'h0, 32'd0, 16'hFFFF, 1'b0, 1'b1, ALU_OR);
    checks++; if (s !== 32'h0000FFFF) begin failures++; $display("FAIL ori zx"); end
    apply(32'd5, 32'd7, 16'h0, 1'b0, 1'b0, ALU_SUB);
    checks++; if (s !== 32'hFFFFFFFE) begin failures++; $display("FAIL sub"); end
    for (int n = 0; n < 3000; n++)
      apply($urandom, $urandom, 16'($urandom), 1'($urandom), 1'($urandom),
            alu_op_e'($urandom_range(0, 4)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
