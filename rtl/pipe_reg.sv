// pipe_reg: one pipeline register between two stages.
//
// Each rising edge it normally loads d. With stall it keeps its contents
// (the instruction waits in place); with bubble it loads BUBBLE, a do-nothing
// value (a NOP whose register fields are 0xF), so an empty slot travels down
// the pipeline. Reset also loads BUBBLE, like "register fD { icode : 4 = NOP; }".
// stall takes precedence over bubble. The payload type T is a parameter so
// the same register serves every stage of both pipelines.
module pipe_reg #(
  parameter type T      = logic [7:0],
  parameter T    BUBBLE = '0
) (
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic bubble,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst)         q <= BUBBLE;
    else if (stall)  q <= q;
    else if (bubble) q <= BUBBLE;
    else             q <= d;
  end

endmodule
