// Register file: 32 registers of 32 bits, r0 hard-wired to zero.
//
// Two combinational read ports serve the decode stage (rs and rt), a third
// lets a host inspect the registers; one
// write port, written on the rising clock edge, serves write-back. A read
// of the register being written in the same cycle returns the old value:
// the pipeline supplies the new value through its write-back forwarding
// path instead, so the file itself needs no internal bypass. Registers are
// cleared by reset (an active-low synchronous reset, this design's choice).
module regfile
  import mips_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  reg_t  ra1,
  output word_t rd1,
  input  reg_t  ra2,
  output word_t rd2,
  input  logic  we,
  input  reg_t  wa,
  input  word_t wd,
  input  reg_t  ra3,      // host inspection port
  output word_t rd3
);

  word_t regs [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
  assign rd3 = (ra3 == '0) ? '0 : regs[ra3];

endmodule
