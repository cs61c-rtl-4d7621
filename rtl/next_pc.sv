// Next-PC logic (instruction address unit) and the PC register.
//
// The PC register holds the address being fetched. Each cycle it advances
// to PC+4, unless the instruction in decode is a beq whose two operands
// (after forwarding) are equal: then it loads the branch target, the
// address after the branch plus the sign-extended offset times four. The
// branch is decided in decode, so the instruction fetched in the same
// cycle as the decision, the one right after the branch, always runs: a
// single branch delay slot. When the hazard logic stalls, the PC keeps its
// value and the same instruction is fetched again.
//
// Interface: pc is the fetch address, pc4 = pc + 4 goes into IF/DE.
// Timing: the new PC appears one clock after the decision. Reset value is
// RESET_PC (this design's choice).
module next_pc
  import mips_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall,      // hold the PC (refetch)
  input  logic        branch,     // a valid beq is in decode
  input  word_t       op_a,       // its forwarded rs value
  input  word_t       op_b,       // its forwarded rt value
  input  word_t       de_pc4,     // address after the beq
  input  logic [15:0] de_imm,     // its offset field
  output word_t       pc,
  output word_t       pc4,
  output logic        taken       // branch taken this cycle
);

  word_t target;

  assign pc4    = pc + 32'd4;
  assign target = de_pc4 + {{14{de_imm[15]}}, de_imm, 2'b00};
  assign taken  = branch && (op_a == op_b) && !stall;

  always_ff @(posedge clk) begin
    if (!rst_n)      pc <= RESET_PC;
    else if (stall)  pc <= pc;
    else if (taken)  pc <= target;
    else             pc <= pc4;
  end

endmodule
