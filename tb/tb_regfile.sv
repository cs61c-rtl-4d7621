// Self-checking test of regfile: random writes and reads on all three
// ports against a model array; r0 must read zero even after a write, and a
// read in the same cycle as a write to that register returns the old value.
module tb_regfile;
  import mips_pkg::*;

  logic clk = 0, rst_n = 0;
  reg_t ra1, ra2, ra3, wa;
  word_t rd1, rd2, rd3, wd;
  logic we;
  int checks = 0, failures = 0;
  word_t model [NREG];

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NREG; i++) model[i] = '0;
    for (int i = 0; i < NREG; i++) begin
      ra1 = reg_t'(i); #1; check(rd1, 32'h0, "after reset");
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we  = ($urandom_range(0, 3) != 0);
      wa  = reg_t'($urandom_range(0, 31));
      wd  = $urandom;
      ra1 = reg_t'($urandom_range(0, 31));
      ra2 = (n % 4 == 0) ? wa : reg_t'($urandom_range(0, 31));
      ra3 = reg_t'($urandom_range(0, 31));
      #1;
      check(rd1, model[ra1], "rd1");
      check(rd2, model[ra2], "rd2 (old value during write)");
      check(rd3, model[ra3], "rd3");
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
