// Pipeline register with a valid bit.
//
// One of these sits between each pair of stages (IF/DE, DE/EX, EX/ME,
// ME/WB); its payload type T is the stage's struct from mips_pkg. On a
// rising edge with en high it loads d and valid_in; with en low it keeps
// its contents (a stall: the stage's clock enable is off). When bubble is
// high (and en high) the valid bit is cleared, so the slot carries a
// do-nothing instruction down the pipe. Later stages gate every write with
// the valid bit. Reset clears valid and payload (synchronous, active low).
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic bubble,
  input  logic valid_in,
  input  T     d,
  output logic valid,
  output T     q
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= 1'b0;
      q     <= '0;
    end else if (en) begin
      valid <= valid_in && !bubble;
      q     <= d;
    end
  end

endmodule
