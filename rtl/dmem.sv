// Data memory: WORDS 32-bit words, word accesses only.
//
// Port 1 is the memory stage of the pipeline: a combinational read at the
// byte address S (bits 1:0 are ignored, the address wraps modulo the
// size), and a write of D on the rising clock edge when MemW is set. The
// address, data and enable all come straight from the EX/ME register, so
// the edge-triggered write sees only pipeline-register outputs.
// Port 2 is a host port (combinational read, edge write) for loading and
// inspecting data; when both ports write the same word, port 1 wins.
// The size and the host port are this design's choices.
module dmem
  import mips_pkg::*;
#(
  parameter int WORDS = 256
) (
  input  logic                     clk,
  input  word_t                    addr,
  output word_t                    rdata,
  input  logic                     we,
  input  word_t                    wdata,
  input  logic [$clog2(WORDS)-1:0] h_addr,  // host word index
  output word_t                    h_rdata,
  input  logic                     h_we,
  input  word_t                    h_wdata
);

  localparam int AW = $clog2(WORDS);

  word_t mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we)                          mem[idx]    <= wdata;
    if (h_we && !(we && idx == h_addr)) mem[h_addr] <= h_wdata;
  end

  assign rdata   = mem[idx];
  assign h_rdata = mem[h_addr];

endmodule
