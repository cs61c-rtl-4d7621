// Self-checking test of pipe_reg with a 40-bit payload: loads when
// enabled, holds both valid bit and payload when the enable is off (stall),
// and clears only the valid bit on a bubble; reset clears everything.
module tb_pipe_reg;
  logic clk = 0, rst_n = 0;
  logic en, bubble, valid_in, valid;
  logic [39:0] d, q;
  int checks = 0, failures = 0;
  logic        mv;
  logic [39:0] mq;

  pipe_reg #(.T(logic [39:0])) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; bubble = 0; valid_in = 1; d = '1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (valid !== 0 || q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    mv = 0; mq = '0;
    for (int n = 0; n < 3000; n++) begin
      en = ($urandom_range(0, 3) != 0);
      bubble = ($urandom_range(0, 3) == 0);
      valid_in = 1'($urandom);
      d = {8'($urandom), 32'($urandom)};
      @(posedge clk);
      if (en) begin mv = valid_in && !bubble; mq = d; end
      @(negedge clk);
      checks++;
      if (valid !== mv || q !== mq) begin
        failures++;
        $display("FAIL cycle %0d: valid=%b q=%h expected %b %h", n, valid, q, mv, mq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
