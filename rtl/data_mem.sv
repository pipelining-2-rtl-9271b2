// data_mem: data memory with its read/write decode.
//
// The memory stage hands over the icode of the instruction it holds; the
// "is read?" and "is write?" logic derives the two enables from it:
// mrmovq reads, rmmovq writes, everything else leaves memory alone. Because
// the icode comes from the memory-stage pipeline register (M_icode), the
// decision belongs to the instruction that is in the memory stage now.
// Memory is DEPTH bytes, accessed eight bytes at a time, little-endian, at
// any byte address (wrapping at DEPTH, a power of two). Reads are
// combinational; writes happen at the rising edge. A load port (ld_*) and a
// read port (dbg_*) serve test benches. DEPTH is this design's choice.
module data_mem
  import y86_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic   clk,
  input  icode_t icode,
  input  word_t  addr,
  input  word_t  wdata,
  output word_t  rdata,
  output logic   mem_read,
  output logic   mem_write,
  input  logic   ld_we,
  input  word_t  ld_addr,
  input  word_t  ld_data,
  input  word_t  dbg_addr,
  output word_t  dbg_data
);

  logic [7:0] mem [DEPTH];

  assign mem_read  = (icode == I_MRMOVQ);
  assign mem_write = (icode == I_RMMOVQ);

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < 8; i++) begin
      if (mem_write) mem[AW'(addr[AW-1:0] + AW'(i))]    <= wdata[8*i +: 8];
      if (ld_we)     mem[AW'(ld_addr[AW-1:0] + AW'(i))] <= ld_data[8*i +: 8];
    end
  end

  always_comb
    for (int unsigned i = 0; i < 8; i++) begin
      rdata[8*i +: 8]    = mem_read ? mem[AW'(addr[AW-1:0] + AW'(i))] : 8'h00;
      dbg_data[8*i +: 8] = mem[AW'(dbg_addr[AW-1:0] + AW'(i))];
    end

endmodule
