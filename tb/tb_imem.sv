// Self-checking test of imem: loads every word through the write port,
// then reads them back at byte addresses (with random low bits and upper
// bits, which must be ignored) and compares with the loaded values.
module tb_imem;
  import mips_pkg::*;
  localparam int WORDS = 64;

  logic clk = 0, we;
  word_t addr, rdata, wdata;
  logic [$clog2(WORDS)-1:0] waddr;
  int checks = 0, failures = 0;
  word_t model [WORDS];

  imem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      int i = $urandom_range(0, WORDS - 1);
      addr = {22'($urandom), 6'(i), 2'($urandom)};
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++; $display("FAIL word %0d: %h vs %h", i, rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
