// y86_split: splits the ten fetched bytes into instruction fields.
//
// Byte 0 holds icode (bits 7:4) and ifun (bits 3:0). Instructions with
// register operands carry rA:rB in byte 1; a constant valC (little-endian,
// eight bytes) follows either byte 1 (jXX) or byte 2 (irmovq, rmmovq,
// mrmovq). The instruction length gives valP = pc + length, the address of
// the next instruction. Supported: halt, nop, rrmovq, irmovq, rmmovq,
// mrmovq, OPq and jXX, with their Y86-64 encodings and lengths. Any other
// icode is reported as invalid and treated as a one-byte nop. Combinational.
module y86_split
  import y86_pkg::*;
(
  input  logic [79:0] ibytes,
  input  word_t       pc,
  output icode_t      icode,
  output logic [3:0]  ifun,
  output reg_t        rA,
  output reg_t        rB,
  output word_t       valC,
  output word_t       valP,
  output logic        valid
);

  logic [3:0] raw_icode;
  logic [3:0] len;
  logic       has_regs;

  assign raw_icode = ibytes[7:4];

  always_comb begin
    valid    = 1'b1;
    icode    = I_NOP;
    has_regs = 1'b0;
    len      = 4'd1;
    valC     = '0;
    unique case (raw_icode)
      4'h0: begin icode = I_HALT;   len = 4'd1; end
      4'h1: begin icode = I_NOP;    len = 4'd1; end
      4'h2: begin icode = I_RRMOVQ; len = 4'd2;  has_regs = 1'b1; end
      4'h3: begin icode = I_IRMOVQ; len = 4'd10; has_regs = 1'b1; valC = ibytes[79:16]; end
      4'h4: begin icode = I_RMMOVQ; len = 4'd10; has_regs = 1'b1; valC = ibytes[79:16]; end
      4'h5: begin icode = I_MRMOVQ; len = 4'd10; has_regs = 1'b1; valC = ibytes[79:16]; end
      4'h6: begin icode = I_OPQ;    len = 4'd2;  has_regs = 1'b1; end
      4'h7: begin icode = I_JXX;    len = 4'd9;  valC = ibytes[71:8]; end
      default: begin valid = 1'b0; icode = I_NOP; len = 4'd1; end
    endcase
  end

  assign ifun = valid ? ibytes[3:0] : 4'h0;
  assign rA   = has_regs ? ibytes[15:12] : RNONE;
  assign rB   = has_regs ? ibytes[11:8]  : RNONE;
  assign valP = pc + word_t'(len);

endmodule
