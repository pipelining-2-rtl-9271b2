// y86_cond: decides whether a conditional jump is taken.
//
// Uses the condition codes left by the last OPq (ZF, SF, OF) and the jump's
// function code: 0 always (jmp), 1 le, 2 l, 3 e, 4 ne, 5 ge, 6 g, as in
// Y86-64. "je" is taken when ZF is set, i.e. when the last subtraction gave
// zero. Unknown codes are never taken. Combinational.
module y86_cond
  import y86_pkg::*;
(
  input  cc_t        cc,
  input  logic [3:0] ifun,
  output logic       cnd
);

  logic lt;
  assign lt = cc.sf ^ cc.of;

  always_comb begin
    unique case (ifun)
      C_ALWAYS: cnd = 1'b1;
      C_LE:     cnd = lt | cc.zf;
      C_L:      cnd = lt;
      C_E:      cnd = cc.zf;
      C_NE:     cnd = ~cc.zf;
      C_GE:     cnd = ~lt;
      C_G:      cnd = ~lt & ~cc.zf;
      default:  cnd = 1'b0;
    endcase
  end

endmodule
