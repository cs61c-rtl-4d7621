// Self-checking test of hazard_unit: random decode/EX situations against
// the interlock rule (a valid load in EX writing a register that a valid
// decode instruction reads, the data register of a store excepted), plus
// directed cases from the load-use example: lw $t0 then sub using $t0.
module tb_hazard_unit;
  import mips_pkg::*;

  logic clk = 0;
  logic de_valid, de_use_rs, de_use_rt, de_store, ex_valid, ex_load, stall, bubble;
  reg_t de_rs, de_rt, ex_rw;
  int checks = 0, failures = 0, stalls = 0;

  hazard_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic exp, string what);
    checks++;
    if (stall !== exp || bubble !== exp) begin
      failures++;
      $display("FAIL %s: stall=%b bubble=%b expected %b", what, stall, bubble, exp);
    end
  endtask

  initial begin
    // lw $t0,0($t1) in EX; sub $t3,$t0,$t2 in decode -> stall
    de_valid = 1; de_use_rs = 1; de_use_rt = 1; de_store = 0;
    de_rs = 5'd8; de_rt = 5'd10; ex_valid = 1; ex_load = 1; ex_rw = 5'd8;
    #1 check(1'b1, "load-use on rs");
    de_rs = 5'd10; de_rt = 5'd8;
    #1 check(1'b1, "load-use on rt");
    de_store = 1;
    #1 check(1'b0, "store data from load: bypassed, no stall");
    de_store = 0; ex_load = 0;
    #1 check(1'b0, "ALU result: forwarded, no stall");
    ex_load = 1; ex_rw = 5'd0; de_rs = 5'd0; de_rt = 5'd0;
    #1 check(1'b0, "r0 never stalls");
    for (int n = 0; n < 5000; n++) begin
      logic exp;
      de_valid = 1'($urandom); de_use_rs = 1'($urandom); de_use_rt = 1'($urandom);
      de_store = 1'($urandom); ex_valid = 1'($urandom); ex_load = 1'($urandom);
      de_rs = reg_t'($urandom_range(0, 3)); de_rt = reg_t'($urandom_range(0, 3));
      ex_rw = reg_t'($urandom_range(0, 3));
      #1;
      exp = de_valid && ex_valid && ex_load && ex_rw != 0 &&
            ((de_use_rs && de_rs == ex_rw) || (de_use_rt && !de_store && de_rt == ex_rw));
      if (exp) stalls++;
      check(exp, "random");
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
