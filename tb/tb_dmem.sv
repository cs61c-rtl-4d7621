// Self-checking test of dmem: random writes and reads on both ports
// against a model array, including same-word writes on both ports in one
// cycle (the pipeline port must win).
module tb_dmem;
  import mips_pkg::*;
  localparam int WORDS = 32;

  logic clk = 0, we, h_we;
  word_t addr, rdata, wdata, h_rdata, h_wdata;
  logic [$clog2(WORDS)-1:0] h_addr;
  int checks = 0, failures = 0;
  word_t model [WORDS];

  dmem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; h_we = 0; addr = 0; wdata = 0; h_addr = 0; h_wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      h_we = 1; h_addr = 5'(i); h_wdata = $urandom; model[i] = h_wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      int i;
      @(negedge clk);
      i = $urandom_range(0, WORDS - 1);
      addr   = {25'($urandom), 5'(i), 2'($urandom)};
      we     = 1'($urandom);
      wdata  = $urandom;
      h_addr = (n % 5 == 0) ? 5'(i) : 5'($urandom);
      h_we   = 1'($urandom);
      h_wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL port1 read"); end
      checks++;
      if (h_rdata !== model[h_addr]) begin failures++; $display("FAIL host read"); end
      @(posedge clk);
      if (h_we) model[h_addr] = h_wdata;
      if (we)   model[i] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
