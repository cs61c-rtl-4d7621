// Instruction memory: WORDS 32-bit words, read combinationally.
//
// The fetch port takes a byte address (the PC) and returns the word at
// address[.. : 2]; the address wraps modulo the memory size. A separate
// write port, word-addressed and written on the rising clock edge, loads
// the program. The size is this design's choice.
module imem
  import mips_pkg::*;
#(
  parameter int WORDS = 256
) (
  input  logic                     clk,
  input  word_t                    addr,    // fetch byte address
  output word_t                    rdata,
  input  logic                     we,      // program load
  input  logic [$clog2(WORDS)-1:0] waddr,   // word index
  input  word_t                    wdata
);

  localparam int AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
