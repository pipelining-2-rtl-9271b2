// y86_alu: the execute-stage ALU and its condition codes.
//
// Computes aluB OP aluA, so "subq %rA, %rB" gives R[rB] - R[rA]; fun selects
// add (0), sub (1), and (2) or xor (3), the Y86-64 OPq function codes.
// cc_out gives ZF (result zero), SF (result negative) and OF (signed
// overflow of an add or subtract; 0 for and/xor) of this result; the
// pipeline latches them only for OPq. Combinational.
module y86_alu
  import y86_pkg::*;
(
  input  word_t      aluA,
  input  word_t      aluB,
  input  logic [3:0] fun,
  output word_t      valE,
  output cc_t        cc_out
);

  always_comb begin
    unique case (fun)
      A_SUB:   valE = aluB - aluA;
      A_AND:   valE = aluB & aluA;
      A_XOR:   valE = aluB ^ aluA;
      default: valE = aluB + aluA;
    endcase
    cc_out.zf = (valE == '0);
    cc_out.sf = valE[XLEN-1];
    unique case (fun)
      A_ADD:   cc_out.of = (aluA[XLEN-1] == aluB[XLEN-1]) && (valE[XLEN-1] != aluB[XLEN-1]);
      A_SUB:   cc_out.of = (aluA[XLEN-1] != aluB[XLEN-1]) && (valE[XLEN-1] != aluB[XLEN-1]);
      default: cc_out.of = 1'b0;
    endcase
  end

endmodule
