// regfile: 16-entry x 64-bit register file with two read and two write ports.
//
// srcA/srcB select the registers read combinationally on rdataA/rdataB.
// Writes happen at the rising clock edge: next R[dstE] and next R[dstM].
// Register number 0xF is "no register": it reads as 0 and writes to it are
// dropped, which is how bubbles and instructions without a destination pass
// through. A read in the same cycle as a write to the same register returns
// the old value (the write lands at the end of the cycle), which is why the
// pipelines need a forwarding path from writeback.
// If dstE and dstM name the same register, the dstM write wins (this design's
// choice). A third write port (ld_*) and a read port (dbg_*) let a test bench
// load and inspect the registers; the array is not reset.
module regfile
  import y86_pkg::*;
(
  input  logic  clk,
  input  reg_t  srcA,
  input  reg_t  srcB,
  output word_t rdataA,
  output word_t rdataB,
  input  reg_t  dstE,
  input  word_t wdataE,
  input  reg_t  dstM,
  input  word_t wdataM,
  input  logic  ld_we,
  input  reg_t  ld_addr,
  input  word_t ld_data,
  input  reg_t  dbg_addr,
  output word_t dbg_data
);

  word_t regs [15];

  always_ff @(posedge clk) begin
    if (ld_we && ld_addr != RNONE) regs[ld_addr] <= ld_data;
    if (dstE != RNONE)             regs[dstE]    <= wdataE;
    if (dstM != RNONE)             regs[dstM]    <= wdataM;
  end

  assign rdataA   = (srcA     == RNONE) ? '0 : regs[srcA];
  assign rdataB   = (srcB     == RNONE) ? '0 : regs[srcB];
  assign dbg_data = (dbg_addr == RNONE) ? '0 : regs[dbg_addr];

endmodule
