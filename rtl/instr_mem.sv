// instr_mem: byte-addressed instruction memory with a wide fetch port.
//
// Returns FETCH_BYTES consecutive bytes starting at pc, combinationally, with
// byte 0 (the one at pc) in bits 7:0; addresses wrap at DEPTH. The two-byte
// fetch suits the addq processor, the ten-byte fetch the Y86-64 pipeline (the
// longest Y86-64 instruction is ten bytes). A synchronous write port (ld_*)
// loads the program. DEPTH is this design's choice.
module instr_mem #(
  parameter int unsigned DEPTH       = 256,
  parameter int unsigned FETCH_BYTES = 10,
  localparam int unsigned AW         = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic [63:0]                pc,
  output logic [8*FETCH_BYTES-1:0]   bytes_out,
  input  logic                       ld_we,
  input  logic [AW-1:0]              ld_addr,
  input  logic [7:0]                 ld_data
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (ld_we) mem[ld_addr] <= ld_data;

  always_comb
    for (int unsigned i = 0; i < FETCH_BYTES; i++)
      bytes_out[8*i +: 8] = mem[AW'(pc[AW-1:0] + AW'(i))];

endmodule
